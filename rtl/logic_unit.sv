// logic_unit: logic sub-module of the ALU. The instruction set has one
// logic operation, bitwise exclusive OR of the two operands. Combinational.
module logic_unit (
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [15:0] y
);
  always_comb y = a ^ b;
endmodule
