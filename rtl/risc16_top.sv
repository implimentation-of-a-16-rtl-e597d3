// risc16_top: single-cycle, non-pipelined 16-bit RISC processor with a
// load/store register architecture and one common (von Neumann) memory.
//
// Every clock cycle the program counter addresses the memory, the decoder
// (IDU) splits the word, the register file delivers the source and
// destination operands, the ALU computes, and at the rising edge the result
// is written to the destination register and the program counter advances.
// The clock control unit gates the program counter, decoder and ALU: all are
// idle during reset, run afterwards and stop for good when HLT is decoded.
//
// Use: hold rst high, write the program (ending with HLT) through
// load_we/load_addr/data_in, release rst. The control unit spends the first
// cycle after reset leaves its reset state; from the second cycle on one
// instruction completes per clock, and halted rises at the edge that ends
// the HLT cycle, so a program of N words (HLT included) takes N + 1 cycles.
// data_out shows the current ALU result; dbg_addr/dbg_data read any
// register at any time. Sign, zero and carry are registered from the
// ALU at every instruction that writes a register.
//
// The block structure and signal names (PC_en, IDU_en, ALU_en, Op-Code, the
// 3-bit addresses, Data_In, Data_Out) follow the published block diagram;
// the host load port, the read-back port and the registered flags are this
// design's own.
module risc16_top
  import risc_pkg::*;
#(
  parameter int unsigned MEM_WORDS = 256
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             load_we,
  input  logic [XLEN-1:0]  load_addr,
  input  logic [XLEN-1:0]  data_in,
  output logic [XLEN-1:0]  data_out,
  output logic [XLEN-1:0]  pc,
  output logic             halted,
  output logic             sign_flag,
  output logic             zero_flag,
  output logic             carry_flag,
  input  logic [RADDR-1:0] dbg_addr,
  output logic [XLEN-1:0]  dbg_data
);
  logic             pc_en, idu_en, alu_en;
  logic [XLEN-1:0]  instr;
  opcode_e          opcode;
  logic [RADDR-1:0] src_addr, dst_addr;
  logic [IMMW-1:0]  imm;
  logic             wrena, halt;
  logic [XLEN-1:0]  src_val, dst_val, result;
  logic             sign, zero, carry;

  clock_control_unit u_ccu (
    .clk, .rst, .halt, .pc_en, .idu_en, .alu_en, .halted
  );

  program_counter #(.WIDTH(XLEN)) u_pc (.clk, .rst, .pc_en, .pc);

  unified_mem #(.WORDS(MEM_WORDS), .WIDTH(XLEN), .AW(XLEN)) u_mem (
    .clk, .we(load_we), .waddr(load_addr), .wdata(data_in), .raddr(pc), .rdata(instr)
  );

  idu u_idu (
    .idu_en, .instr, .opcode, .src_addr, .dst_addr, .imm, .wrena, .halt
  );

  register_file #(.NREGS(8), .WIDTH(XLEN)) u_rf (
    .clk, .rst, .we(wrena), .waddr(dst_addr), .wdata(result),
    .raddr_s(src_addr), .rdata_s(src_val),
    .raddr_d(dst_addr), .rdata_d(dst_val),
    .raddr_x(dbg_addr), .rdata_x(dbg_data)
  );

  alu u_alu (
    .alu_en, .opcode, .src(src_val), .dst(dst_val), .imm,
    .result, .sign, .zero, .carry
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      sign_flag  <= 1'b0;
      zero_flag  <= 1'b0;
      carry_flag <= 1'b0;
    end else if (wrena) begin
      sign_flag  <= sign;
      zero_flag  <= zero;
      carry_flag <= carry;
    end
  end

  assign data_out = result;

  // After HLT the processor is frozen: no register write, no PC change.
  a_no_write_when_halted: assert property (@(posedge clk) disable iff (rst)
                                           halted |-> !wrena);
  a_pc_frozen_when_halted: assert property (@(posedge clk) disable iff (rst)
                                            halted && $past(halted) |-> $stable(pc));
endmodule
