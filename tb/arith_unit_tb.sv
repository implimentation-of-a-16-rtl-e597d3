// arith_unit_tb: checks the arithmetic sub-module on random operands: the
// sum and carry against a + b, the product against a[7:0] * b[7:0], plus the
// 513/513 operand pair of the published trace (sum 1026, product 1).
module arith_unit_tb;
  int checks = 0, failures = 0;
  logic [15:0] a, b, s, p;
  logic cout;
  arith_unit dut (.a, .b, .sum(s), .cout, .prod(p));

  task automatic check(input logic [15:0] ta, input logic [15:0] tb);
    a = ta; b = tb; #1;
    checks++;
    if ({cout, s} !== 17'(ta) + 17'(tb)) begin failures++; $display("FAIL add %h %h", ta, tb); end
    checks++;
    if (p !== 16'(ta[7:0]) * 16'(tb[7:0])) begin failures++; $display("FAIL mul %h %h", ta, tb); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(16'd513, 16'd513);
    checks++; if (s !== 16'd1026 || p !== 16'd1) failures++;
    for (int i = 0; i < 5000; i++) check(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
