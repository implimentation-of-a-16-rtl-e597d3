// logic_unit_tb: checks the XOR sub-module on random operands and on the
// 513/513 pair of the published trace (result 0).
module logic_unit_tb;
  int checks = 0, failures = 0;
  logic [15:0] a, b, y;
  logic_unit dut (.a, .b, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 16'd513; b = 16'd513; #1;
    checks++; if (y !== 16'd0) failures++;
    for (int i = 0; i < 2000; i++) begin
      a = 16'($urandom); b = 16'($urandom); #1;
      checks++;
      // reference: x ^ y = (x | y) & ~(x & y)
      if (y !== ((a | b) & ~(a & b))) begin failures++; $display("FAIL %h ^ %h = %h", a, b, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
