// risc_pkg: widths, instruction fields and opcodes shared by the 16-bit
// single-cycle RISC processor.
//
// Instruction formats (16 bits, opcode in the top five bits):
//   immediate load : [15:11] opcode | [10:8] destination | [7:0] 8-bit data
//   register op    : [15:11] opcode | [10:8] source | [7:5] destination | [4:0] 00000
// The opcode values MUL=2 .. HLT=7 follow the published simulation trace;
// LHI=0 is the load format's opcode and LLI=1 is this design's choice for the
// one remaining code. Register operations work as Rd <= Rd op Rs.
package risc_pkg;
  localparam int unsigned XLEN   = 16;  // data and instruction width
  localparam int unsigned RADDR  = 3;   // register address width (8 registers)
  localparam int unsigned OPW    = 5;   // opcode width
  localparam int unsigned IMMW   = 8;   // immediate width

  typedef enum logic [OPW-1:0] {
    OP_LHI = 5'b00000,  // Rd[15:8] <= imm
    OP_LLI = 5'b00001,  // Rd[7:0]  <= imm
    OP_MUL = 5'b00010,  // Rd <= Rd[7:0] * Rs[7:0]
    OP_XOR = 5'b00011,  // Rd <= Rd ^ Rs
    OP_LS  = 5'b00100,  // Rd <= Rd << 1
    OP_RS  = 5'b00101,  // Rd <= Rd >> 1
    OP_SUM = 5'b00110,  // Rd <= Rd + Rs
    OP_HLT = 5'b00111   // stop fetching
  } opcode_e;

  // Fields of an instruction word, valid for both formats.
  typedef struct packed {
    opcode_e          op;      // [15:11]
    logic [RADDR-1:0] f1;      // [10:8]  destination (load) or source (register op)
    logic [RADDR-1:0] f2;      // [7:5]   destination (register op)
    logic [4:0]       low;     // [4:0]
  } instr_t;

  // Build an immediate load word.
  function automatic logic [XLEN-1:0] enc_load(opcode_e op, logic [RADDR-1:0] rd,
                                               logic [IMMW-1:0] imm);
    return {op, rd, imm};
  endfunction

  // Build a register-register (or halt) word.
  function automatic logic [XLEN-1:0] enc_reg(opcode_e op, logic [RADDR-1:0] rs,
                                              logic [RADDR-1:0] rd);
    return {op, rs, rd, 5'b00000};
  endfunction
endpackage
