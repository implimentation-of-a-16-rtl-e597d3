// register_file_tb: random writes and reads on all three read ports of the
// 8 x 16 register file, compared with a shadow array; checks that reset
// clears every register and that nothing is written while we is low.
module register_file_tb;
  int checks = 0, failures = 0;
  logic clk = 0, rst, we;
  logic [2:0] wa, rs, rd, rx;
  logic [15:0] wd, ds, dd, dx;
  logic [15:0] shadow [8];

  register_file dut (.clk, .rst, .we, .waddr(wa), .wdata(wd), .raddr_s(rs), .rdata_s(ds),
                     .raddr_d(rd), .rdata_d(dd), .raddr_x(rx), .rdata_x(dx));
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; we = 0; wa = 0; wd = 0; rs = 0; rd = 0; rx = 0;
    @(posedge clk); #1; rst = 0;
    for (int i = 0; i < 8; i++) begin
      shadow[i] = '0;
      rx = 3'(i); #1; checks++; if (dx !== 16'd0) failures++;
    end
    for (int i = 0; i < 3000; i++) begin
      we = 1'($urandom); wa = 3'($urandom); wd = 16'($urandom);
      @(posedge clk); #1;
      if (we) shadow[wa] = wd;
      rs = 3'($urandom); rd = 3'($urandom); rx = 3'($urandom); #1;
      checks++;
      if (ds !== shadow[rs] || dd !== shadow[rd] || dx !== shadow[rx]) begin
        failures++; $display("FAIL read rs=%0d rd=%0d rx=%0d", rs, rd, rx);
      end
    end
    we = 0; rst = 1; @(posedge clk); #1; rst = 0;
    for (int i = 0; i < 8; i++) begin
      rx = 3'(i); #1; checks++; if (dx !== 16'd0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
