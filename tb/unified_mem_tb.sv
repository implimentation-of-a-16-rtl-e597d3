// unified_mem_tb: fills the 256-word memory with random words, reads every
// word back through the combinational read port, checks that the upper
// address bits are ignored and that a word is unchanged while we is low.
module unified_mem_tb;
  int checks = 0, failures = 0;
  logic clk = 0, we;
  logic [15:0] wa, wd, ra, rdat;
  logic [15:0] shadow [256];

  unified_mem dut (.clk, .we, .waddr(wa), .wdata(wd), .raddr(ra), .rdata(rdat));
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1;
    for (int i = 0; i < 256; i++) begin
      wa = 16'(i); wd = 16'($urandom); shadow[i] = wd;
      @(posedge clk); #1;
    end
    we = 0; wd = 16'hDEAD;
    for (int i = 0; i < 256; i++) begin
      wa = 16'(i); @(posedge clk); #1;
      ra = 16'(i); #1;
      checks++;
      if (rdat !== shadow[i]) begin failures++; $display("FAIL addr %0d", i); end
      ra = 16'(i) | 16'hA500; #1;
      checks++;
      if (rdat !== shadow[i]) begin failures++; $display("FAIL alias %h", ra); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
