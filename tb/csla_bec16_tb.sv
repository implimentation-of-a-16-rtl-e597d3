// csla_bec16_tb: checks the 16-bit BEC carry select adder against a + b + cin
// on corner cases (carries rippling through every group boundary) and on
// 20000 random operand pairs with both carry-in values.
module csla_bec16_tb;
  int checks = 0, failures = 0;
  logic [15:0] a, b, s;
  logic cin, cout;
  csla_bec16 dut (.a, .b, .cin, .sum(s), .cout);

  task automatic check(input logic [15:0] ta, input logic [15:0] tb, input logic tc);
    logic [16:0] exp;
    a = ta; b = tb; cin = tc; #1;
    exp = 17'(ta) + 17'(tb) + 17'(tc);
    checks++;
    if ({cout, s} !== exp) begin
      failures++; $display("FAIL %h+%h+%b = %h exp %h", ta, tb, tc, {cout, s}, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(16'hFFFF, 16'h0000, 1'b1);
    check(16'hFFFF, 16'hFFFF, 1'b1);
    check(16'h0003, 16'h0001, 1'b0);  // carry out of group 0
    check(16'h000C, 16'h0004, 1'b0);  // carry out of group 1
    check(16'h0070, 16'h0010, 1'b0);  // carry out of group 2
    check(16'h0780, 16'h0080, 1'b0);  // carry out of group 3
    check(16'h0201, 16'h0201, 1'b0);  // 513 + 513
    check(16'h7FFF, 16'h0001, 1'b0);
    for (int i = 0; i < 20000; i++) check(16'($urandom), 16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
