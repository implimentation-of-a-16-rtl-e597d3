// rca_tb: exhaustive check of the ripple carry adder at N = 4 (all a, b and
// carry-in) against {cout, sum} = a + b + cin.
module rca_tb;
  int checks = 0, failures = 0;
  logic [3:0] a, b, s;
  logic cin, cout;
  rca #(.N(4)) dut (.a, .b, .cin, .sum(s), .cout);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      {cin, a, b} = 9'(i); #1;
      checks++;
      if ({cout, s} !== 5'(a + b + cin)) begin
        failures++; $display("FAIL %0d+%0d+%0d = %0d", a, b, cin, {cout, s});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
