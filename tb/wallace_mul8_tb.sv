// wallace_mul8_tb: exhaustive check of the 8 x 8 Wallace tree multiplier,
// all 65536 operand pairs against x * y.
module wallace_mul8_tb;
  int checks = 0, failures = 0;
  logic [7:0] x, y;
  logic [15:0] p;
  wallace_mul8 dut (.x, .y, .p);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 65536; i++) begin
      {x, y} = 16'(i); #1;
      checks++;
      if (p !== 16'(x) * 16'(y)) begin
        failures++;
        if (failures < 10) $display("FAIL %0d*%0d = %0d", x, y, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
