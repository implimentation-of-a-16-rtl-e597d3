// shift_unit: shift sub-module of the ALU, a 16-bit logical barrel shifter.
// It shifts the operand left (right = 0) or right (right = 1) by amt bit
// positions, 0 to 15, filling with zeros, through four stages that shift by
// 1, 2, 4 and 8 when the matching bit of amt is set. The ALU's LS and RS
// instructions use a distance of one, which matches the published trace
// (513 gives 1026 and 256); the amount input is this design's reading of
// "shift by a defined number of bit positions". Combinational.
module shift_unit (
  input  logic [15:0] a,
  input  logic [3:0]  amt,
  input  logic        right,
  output logic [15:0] y
);
  logic [15:0] st [5];
  always_comb begin
    st[0] = a;
    for (int k = 0; k < 4; k++) begin
      if (!amt[k])    st[k+1] = st[k];
      else if (right) st[k+1] = st[k] >> (1 << k);
      else            st[k+1] = st[k] << (1 << k);
    end
    y = st[4];
  end
endmodule
