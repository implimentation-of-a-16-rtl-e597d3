// program_counter_tb: checks reset to 0, counting by one per enabled clock,
// holding while disabled (random enable pattern against a model), and the
// wrap from 16'hFFFF to 0.
module program_counter_tb;
  int checks = 0, failures = 0;
  logic clk = 0, rst, en;
  logic [15:0] pc, model;

  program_counter dut (.clk, .rst, .pc_en(en), .pc);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; en = 0;
    @(posedge clk); #1; rst = 0; model = 0;
    checks++; if (pc !== 16'd0) failures++;
    for (int i = 0; i < 2000; i++) begin
      en = 1'($urandom);
      @(posedge clk); #1;
      if (en) model = model + 16'd1;
      checks++;
      if (pc !== model) begin failures++; $display("FAIL pc=%h exp %h", pc, model); end
    end
    // run to the end of the address space and wrap
    en = 1;
    do begin @(posedge clk); #1; end while (pc != 16'hFFFF);
    @(posedge clk); #1;
    checks++; if (pc !== 16'd0) begin failures++; $display("FAIL wrap pc=%h", pc); end
    en = 0; rst = 1; @(posedge clk); #1;
    checks++; if (pc !== 16'd0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
