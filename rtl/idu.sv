// idu: instruction decoder unit. It splits the instruction read at the
// program counter's address into the opcode for the ALU, the 3-bit source
// and destination register addresses and the 8-bit immediate, and raises
// WRENA (register write enable) for every instruction that writes a
// register, and halt for HLT.
//   immediate load (LHI, LLI): [15:11] op | [10:8] Rd | [7:0] imm
//   register op               : [15:11] op | [10:8] Rs | [7:5] Rd | [4:0] 0
// Bits [4:0] of a register op carry no information and are not decoded.
// Unused opcodes decode as no-operation. Nothing is written and no halt is
// raised while idu_en is low. Combinational.
module idu
  import risc_pkg::*;
(
  input  logic             idu_en,
  input  logic [XLEN-1:0]  instr,
  output opcode_e          opcode,
  output logic [RADDR-1:0] src_addr,
  output logic [RADDR-1:0] dst_addr,
  output logic [IMMW-1:0]  imm,
  output logic             wrena,
  output logic             halt
);
  instr_t f;
  always_comb begin
    f        = instr_t'(instr);
    opcode   = f.op;
    imm      = instr[IMMW-1:0];
    src_addr = f.f1;
    dst_addr = f.f2;
    wrena    = 1'b0;
    halt     = 1'b0;
    case (f.op)
      OP_LHI, OP_LLI: begin
        dst_addr = f.f1;
        src_addr = f.f1;
        wrena    = idu_en;
      end
      OP_MUL, OP_XOR, OP_LS, OP_RS, OP_SUM: wrena = idu_en;
      OP_HLT: halt = idu_en;
      default: ;
    endcase
  end
endmodule
