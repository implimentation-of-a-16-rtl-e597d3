// shift_unit_tb: checks the barrel shifter for every distance 0..15 in both
// directions on random words against a reference built from multiplication
// and division by 2^amt, plus the one-bit shifts of 513 (1026 and 256) used
// by the LS and RS instructions.
module shift_unit_tb;
  int checks = 0, failures = 0;
  logic [15:0] a, y;
  logic [3:0]  amt;
  logic        right;
  shift_unit dut (.a, .amt, .right, .y);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 16'd513; amt = 4'd1; right = 1'b0; #1;
    checks++; if (y !== 16'd1026) begin failures++; $display("FAIL 513 << 1 = %0d", y); end
    right = 1'b1; #1;
    checks++; if (y !== 16'd256) begin failures++; $display("FAIL 513 >> 1 = %0d", y); end
    for (int i = 0; i < 500; i++) begin
      a = 16'($urandom);
      for (int s = 0; s < 16; s++) begin
        logic [31:0] p2;
        p2 = 32'd1 << s;
        amt = 4'(s);
        right = 1'b0; #1;
        checks++;
        if (y !== 16'(32'(a) * p2)) begin failures++; $display("FAIL %h << %0d = %h", a, s, y); end
        right = 1'b1; #1;
        checks++;
        if (y !== 16'(32'(a) / p2)) begin failures++; $display("FAIL %h >> %0d = %h", a, s, y); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
