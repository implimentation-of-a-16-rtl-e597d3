// csla_bec_group: one upper group of the BEC carry select adder. An N-bit
// ripple carry adder with carry-in 0 gives {c0, s0}; an (N+1)-bit Binary to
// Excess-1 Converter gives {c0, s0} + 1, which is the group result for a
// carry-in of one. The multiplexer picks one of the two (N+1)-bit words by
// csel, the carry from the group below. Combinational.
module csla_bec_group #(
  parameter int unsigned N = 2
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         csel,
  output logic [N-1:0] sum,
  output logic         cout
);
  logic [N-1:0] s0;
  logic         c0;
  logic [N:0]   x1;  // {c0, s0} + 1

  rca #(.N(N))   u_rca (.a(a), .b(b), .cin(1'b0), .sum(s0), .cout(c0));
  bec #(.N(N+1)) u_bec (.b({c0, s0}), .x(x1));

  always_comb begin
    if (csel) {cout, sum} = x1;
    else      {cout, sum} = {c0, s0};
  end
endmodule
