// arith_unit: arithmetic sub-module of the ALU. It adds the two 16-bit
// operands with the BEC carry select adder (carry-in 0, as the instruction
// set has no add-with-carry) and multiplies their low bytes with the 8 x 8
// modified Wallace tree multiplier. Both results are produced every cycle;
// the ALU picks one. Combinational.
module arith_unit (
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [15:0] sum,
  output logic        cout,
  output logic [15:0] prod
);
  csla_bec16   u_add (.a(a), .b(b), .cin(1'b0), .sum(sum), .cout(cout));
  wallace_mul8 u_mul (.x(a[7:0]), .y(b[7:0]), .p(prod));
endmodule
