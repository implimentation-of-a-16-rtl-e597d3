// bec: N-bit Binary to Excess-1 Converter, x = b + 1 modulo 2^N. Bit i is
// b[i] inverted when all lower bits are one, so it needs only XOR gates and
// an AND chain instead of a second ripple carry adder. In the carry select
// adder it turns the carry-in-0 sum of a group into its carry-in-1 sum; the
// program counter uses it as its incrementer. Combinational.
module bec #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] b,
  output logic [N-1:0] x
);
  logic [N-1:0] all1;  // all1[i]: bits below i are all one
  assign all1[0] = 1'b1;
  for (genvar i = 0; i < N; i++) begin : g_bit
    assign x[i] = b[i] ^ all1[i];
    if (i < N - 1) begin : g_chain
      assign all1[i+1] = all1[i] & b[i];
    end
  end
endmodule
