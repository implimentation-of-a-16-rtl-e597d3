// csla_bec16: 16-bit low power, area efficient carry select adder.
//
// The operands are split into five groups, bits [1:0], [3:2], [6:4], [10:7]
// and [15:11]. The lowest group is a 2-bit ripple carry adder fed by cin.
// Each upper group of n bits has one n-bit ripple carry adder with carry-in 0
// and, instead of a second adder with carry-in 1, an (n+1)-bit Binary to
// Excess-1 Converter that adds one to the {carry, sum} of the first adder.
// A 2(n+1):(n+1) multiplexer, steered by the carry out of the group below,
// picks the group's sum bits and carry. Group boundaries, adder and
// converter widths and the 6:3, 8:4, 10:5 and 12:6 multiplexers follow the
// published adder diagram; the carries between groups are c1, c3, c6, c10.
//
// Combinational: {cout, sum} = a + b + cin.
module csla_bec16 (
  input  logic [15:0] a,
  input  logic [15:0] b,
  input  logic        cin,
  output logic [15:0] sum,
  output logic        cout
);
  logic c1, c3, c6, c10;

  // group 0: bits [1:0], plain ripple carry adder with the real carry in
  rca #(.N(2)) u_g0 (.a(a[1:0]), .b(b[1:0]), .cin(cin), .sum(sum[1:0]), .cout(c1));

  // upper groups: RCA (cin = 0) + BEC + mux
  csla_bec_group #(.N(2)) u_g1 (.a(a[3:2]),   .b(b[3:2]),   .csel(c1),  .sum(sum[3:2]),   .cout(c3));
  csla_bec_group #(.N(3)) u_g2 (.a(a[6:4]),   .b(b[6:4]),   .csel(c3),  .sum(sum[6:4]),   .cout(c6));
  csla_bec_group #(.N(4)) u_g3 (.a(a[10:7]),  .b(b[10:7]),  .csel(c6),  .sum(sum[10:7]),  .cout(c10));
  csla_bec_group #(.N(5)) u_g4 (.a(a[15:11]), .b(b[15:11]), .csel(c10), .sum(sum[15:11]), .cout(cout));
endmodule
