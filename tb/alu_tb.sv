// alu_tb: checks every ALU operation against a reference model written
// here, on random operands, including the flags; then the five results of
// the published trace (operands 513 and 513: MUL 1, XOR 0, LS 1026, RS 256,
// SUM 1026) and that alu_en low gives 0.
module alu_tb;
  import risc_pkg::*;
  int checks = 0, failures = 0;
  logic            alu_en;
  opcode_e         op;
  logic [15:0]     src, dst, res;
  logic [7:0]      imm;
  logic            sign, zero, carry;

  alu dut (.alu_en, .opcode(op), .src, .dst, .imm, .result(res), .sign, .zero, .carry);

  function automatic logic [16:0] model(opcode_e o, logic [15:0] s, logic [15:0] d, logic [7:0] im);
    logic [16:0] sum;
    sum = 17'(d) + 17'(s);
    case (o)
      OP_LHI: return {1'b0, im, d[7:0]};
      OP_LLI: return {1'b0, d[15:8], im};
      OP_MUL: return {1'b0, 16'(int'(d[7:0]) * int'(s[7:0]))};
      OP_XOR: return {1'b0, d ^ s};
      OP_LS:  return {1'b0, 16'(d * 16'd2)};
      OP_RS:  return {1'b0, d / 16'd2};
      OP_SUM: return sum;
      default: return '0;
    endcase
  endfunction

  task automatic check(opcode_e o, logic [15:0] s, logic [15:0] d, logic [7:0] im);
    logic [16:0] exp;
    op = o; src = s; dst = d; imm = im; #1;
    exp = model(o, s, d, im);
    checks++;
    if ({carry, res} !== exp || sign !== exp[15] || zero !== (exp[15:0] == 0)) begin
      failures++;
      $display("FAIL op=%s s=%h d=%h imm=%h -> c=%b r=%h s=%b z=%b exp %h", o.name(), s, d, im,
               carry, res, sign, zero, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    alu_en = 1'b1;
    for (int i = 0; i < 4000; i++)
      check(opcode_e'(5'($urandom_range(0, 8))), 16'($urandom), 16'($urandom), 8'($urandom));
    check(OP_SUM, 16'hFFFF, 16'h0001, 8'h00);   // carry and zero
    check(OP_XOR, 16'h8000, 16'h0000, 8'h00);   // sign
    // published trace values, both operands 513
    op = OP_MUL; src = 16'd513; dst = 16'd513; #1; checks++; if (res !== 16'd1)    failures++;
    op = OP_XOR; #1;                                checks++; if (res !== 16'd0)    failures++;
    op = OP_LS;  #1;                                checks++; if (res !== 16'd1026) failures++;
    op = OP_RS;  #1;                                checks++; if (res !== 16'd256)  failures++;
    op = OP_SUM; #1;                                checks++; if (res !== 16'd1026) failures++;
    alu_en = 1'b0; #1;                              checks++; if (res !== 16'd0 || carry) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
