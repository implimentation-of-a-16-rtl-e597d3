// bec_tb: exhaustive check of the Binary to Excess-1 Converter at N = 4 and
// N = 6: every input must come out as input + 1 modulo 2^N.
module bec_tb;
  int checks = 0, failures = 0;
  logic [3:0] b4, x4;
  logic [5:0] b6, x6;
  bec #(.N(4)) dut4 (.b(b4), .x(x4));
  bec #(.N(6)) dut6 (.b(b6), .x(x6));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      b4 = 4'(i); #1;
      checks++;
      if (x4 !== 4'(i + 1)) begin failures++; $display("FAIL N=4 b=%0d x=%0d", b4, x4); end
    end
    for (int i = 0; i < 64; i++) begin
      b6 = 6'(i); #1;
      checks++;
      if (x6 !== 6'(i + 1)) begin failures++; $display("FAIL N=6 b=%0d x=%0d", b6, x6); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
