// alu: arithmetic and logic unit of the 16-bit RISC processor.
//
// It holds the three sub-modules (arithmetic, logic, shift) and selects the
// result by opcode:
//   LHI  {imm, dst[7:0]}       LLI  {dst[15:8], imm}
//   MUL  dst[7:0] * src[7:0]   XOR  dst ^ src
//   LS   dst << 1              RS   dst >> 1
//   SUM  dst + src             HLT and unused codes: 0
// dst is the destination register's current value and src the source
// register's, so register operations read Rd <= Rd op Rs. Sign is result[15],
// zero is (result == 0), carry is the adder's carry out for SUM and 0 for the
// rest. With alu_en low the result is 0. Combinational: the result is written
// back at the end of the same cycle.
module alu
  import risc_pkg::*;
(
  input  logic            alu_en,
  input  opcode_e         opcode,
  input  logic [XLEN-1:0] src,
  input  logic [XLEN-1:0] dst,
  input  logic [IMMW-1:0] imm,
  output logic [XLEN-1:0] result,
  output logic            sign,
  output logic            zero,
  output logic            carry
);
  logic [XLEN-1:0] sum, prod, x, sh;
  logic            cout;

  arith_unit u_arith (.a(dst), .b(src), .sum(sum), .cout(cout), .prod(prod));
  logic_unit u_logic (.a(dst), .b(src), .y(x));
  shift_unit u_shift (.a(dst), .amt(4'd1), .right(opcode == OP_RS), .y(sh));

  always_comb begin
    result = '0;
    carry  = 1'b0;
    if (alu_en) begin
      case (opcode)
        OP_LHI: result = {imm, dst[7:0]};
        OP_LLI: result = {dst[15:8], imm};
        OP_MUL: result = prod;
        OP_XOR: result = x;
        OP_LS,
        OP_RS:  result = sh;
        OP_SUM: begin result = sum; carry = cout; end
        default: result = '0;
      endcase
    end
    sign = result[XLEN-1];
    zero = (result == '0);
  end
endmodule
