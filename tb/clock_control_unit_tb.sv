// clock_control_unit_tb: checks the enables in reset (all low), the first
// running cycle after reset (all high), the HLT cycle (pc_en low at once,
// halted one cycle later), that the unit stays halted whatever halt does,
// and that a new reset starts it again.
module clock_control_unit_tb;
  int checks = 0, failures = 0;
  logic clk = 0, rst, halt;
  logic pc_en, idu_en, alu_en, halted;

  clock_control_unit dut (.clk, .rst, .halt, .pc_en, .idu_en, .alu_en, .halted);
  always #5 clk = ~clk;

  task automatic expect4(logic p, logic i, logic a, logic h, string what);
    checks++;
    if ({pc_en, idu_en, alu_en, halted} !== {p, i, a, h}) begin
      failures++; $display("FAIL %s: %b%b%b%b", what, pc_en, idu_en, alu_en, halted);
    end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int run = 0; run < 2; run++) begin
      rst = 1; halt = 0;
      repeat (2) @(posedge clk); #1;
      expect4(0, 0, 0, 0, "reset");
      rst = 0; @(posedge clk); #1;
      expect4(1, 1, 1, 0, "run");
      repeat (3 + run) begin @(posedge clk); #1; expect4(1, 1, 1, 0, "running"); end
      halt = 1; #1;
      expect4(0, 1, 1, 0, "hlt cycle");
      @(posedge clk); #1;
      expect4(0, 0, 0, 1, "halted");
      halt = 0;
      repeat (3) begin @(posedge clk); #1; expect4(0, 0, 0, 1, "stays halted"); end
      halt = 1; @(posedge clk); #1; expect4(0, 0, 0, 1, "halted, halt high");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
