// rca: N-bit ripple carry adder, a chain of full adders in which the carry
// passes from bit 0 to bit N-1. Combinational: {cout, sum} = a + b + cin.
// It forms the lowest group of the carry select adder (with the real carry
// in) and the carry-in-0 adder of each upper group.
module rca #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);
  logic [N:0] c;
  assign c[0] = cin;
  for (genvar i = 0; i < N; i++) begin : g_fa
    full_adder u_fa (.a(a[i]), .b(b[i]), .cin(c[i]), .sum(sum[i]), .cout(c[i+1]));
  end
  assign cout = c[N];
endmodule
