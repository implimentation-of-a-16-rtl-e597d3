// idu_tb: decodes every one of the 65536 instruction words, with the decoder
// enabled and disabled, and compares the fields, WRENA and halt with the
// formats: loads [15:11] op | [10:8] Rd | [7:0] imm, register ops
// [15:11] op | [10:8] Rs | [7:5] Rd.
module idu_tb;
  import risc_pkg::*;
  int checks = 0, failures = 0;
  logic        en;
  logic [15:0] instr;
  opcode_e     op;
  logic [2:0]  sa, da;
  logic [7:0]  imm;
  logic        wrena, halt;

  idu dut (.idu_en(en), .instr, .opcode(op), .src_addr(sa), .dst_addr(da), .imm, .wrena, .halt);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int i = 0; i < 65536; i++) begin
        logic [4:0] o;
        logic       is_load, is_reg, e_we, e_halt;
        logic [2:0] e_da;
        en = 1'(e); instr = 16'(i); #1;
        o       = instr[15:11];
        is_load = (o == 5'd0) || (o == 5'd1);
        is_reg  = (o >= 5'd2) && (o <= 5'd6);
        e_we    = en && (is_load || is_reg);
        e_halt  = en && (o == 5'd7);
        e_da    = is_load ? instr[10:8] : instr[7:5];
        checks++;
        if (op !== opcode_e'(o) || imm !== instr[7:0] || wrena !== e_we || halt !== e_halt ||
            da !== e_da || (is_reg && sa !== instr[10:8])) begin
          failures++;
          if (failures < 10) $display("FAIL en=%b instr=%h op=%h sa=%0d da=%0d we=%b h=%b", en, instr, op, sa, da, wrena, halt);
        end
      end
    end
    // the trace's SUM and HLT words
    en = 1'b1; instr = enc_reg(OP_SUM, 3'd1, 3'd2); #1;
    checks++; if (op !== OP_SUM || sa !== 3'd1 || da !== 3'd2 || !wrena) failures++;
    instr = enc_reg(OP_HLT, 3'd0, 3'd0); #1;
    checks++; if (!halt || wrena) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
