// risc16_top_tb: end-to-end test of the processor at its default size.
//
// Each program is written into memory through the host port while reset is
// held, run until halted, and compared with an instruction-level reference
// model kept in this testbench: the ALU result (data_out) of every cycle,
// the final contents of all eight registers and the flags, and the run time
// of N + 1 cycles for N words (one instruction per clock). Programs:
//   1. the operation sequence of the published trace: both operands 513
//      (built with LHI 2 / LLI 1), then MUL, XOR, LS, RS, SUM and HLT,
//      expecting 1, 0, 1026, 256, 1026;
//   2. a 1-D convolution y[n] = sum_k h[k] x[n-k] with three taps and
//      byte-sized samples, computed with MUL and SUM;
//   3. 40 random programs; every program has data words after HLT that
//      would change registers if they were executed.
// Counted mechanisms, each of which must occur: every opcode, a SUM carry,
// a zero result, a negative result, a halt with data words behind it.
module risc16_top_tb;
  import risc_pkg::*;
  int checks = 0, failures = 0;

  logic             clk = 0, rst = 1, load_we = 0;
  logic [XLEN-1:0]  load_addr = '0, data_in = '0;
  logic [XLEN-1:0]  data_out, pc, dbg_data;
  logic             halted, sign_flag, zero_flag, carry_flag;
  logic [RADDR-1:0] dbg_addr = '0;

  risc16_top dut (.clk, .rst, .load_we, .load_addr, .data_in, .data_out, .pc, .halted,
                  .sign_flag, .zero_flag, .carry_flag, .dbg_addr, .dbg_data);
  always #5 clk = ~clk;

  // ---------------- reference model ----------------
  logic [15:0] prog [$];
  logic [15:0] mregs [8];
  logic        msign, mzero, mcarry;
  int n_op [8];
  int n_carry, n_zero, n_neg, n_halt_data;

  // one instruction; returns 1 for HLT; res is the ALU result
  function automatic bit model_step(logic [15:0] w, output logic [15:0] res);
    logic [4:0] o = w[15:11];
    logic [2:0] rd, rs;
    logic [16:0] s17;
    logic c = 1'b0;
    bit writes = 1'b1;
    res = '0;
    if (o <= 5'd1) rd = w[10:8]; else rd = w[7:5];
    rs = w[10:8];
    case (o)
      5'd0: res = {w[7:0], mregs[rd][7:0]};
      5'd1: res = {mregs[rd][15:8], w[7:0]};
      5'd2: res = 16'(mregs[rd][7:0] * mregs[rs][7:0]);
      5'd3: res = mregs[rd] ^ mregs[rs];
      5'd4: res = 16'(mregs[rd] << 1);
      5'd5: res = mregs[rd] >> 1;
      5'd6: begin s17 = 17'(mregs[rd]) + 17'(mregs[rs]); res = s17[15:0]; c = s17[16]; end
      default: writes = 1'b0;
    endcase
    if (o <= 5'd7) n_op[o[2:0]]++;
    if (writes) begin
      mregs[rd] = res;
      msign = res[15]; mzero = (res == 0); mcarry = c;
      if (c) n_carry++;
      if (res == 0) n_zero++;
      if (res[15]) n_neg++;
    end
    return o == 5'd7;
  endfunction

  // ---------------- program runner ----------------
  task automatic run_program(string name, int n_data);
    int n_words, cycles;
    logic [15:0] exp_res;
    bit hlt;
    n_words = prog.size() - n_data;
    rst = 1;
    for (int i = 0; i < prog.size(); i++) begin
      load_we = 1; load_addr = 16'(i); data_in = prog[i];
      @(posedge clk); #1;
    end
    load_we = 0;
    @(posedge clk); #1;
    for (int i = 0; i < 8; i++) mregs[i] = '0;
    msign = 0; mzero = 0; mcarry = 0;
    rst = 0;
    @(posedge clk); #1;           // control unit leaves reset
    cycles = 1;
    for (int i = 0; i < n_words; i++) begin
      hlt = model_step(prog[i], exp_res);
      checks++;
      if (pc !== 16'(i) || data_out !== exp_res) begin
        failures++;
        $display("FAIL %s step %0d: pc=%0d data_out=%0d exp %0d", name, i, pc, data_out, exp_res);
      end
      @(posedge clk); #1;
      cycles++;
      if (hlt) break;
    end
    checks++;
    if (!halted || cycles != n_words + 1) begin
      failures++; $display("FAIL %s: halted=%b after %0d cycles, exp %0d", name, halted, cycles, n_words + 1);
    end
    if (n_data > 0) n_halt_data++;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (pc !== 16'(n_words - 1)) begin failures++; $display("FAIL %s: pc moved to %0d after HLT", name, pc); end
    for (int r = 0; r < 8; r++) begin
      dbg_addr = 3'(r); #1;
      checks++;
      if (dbg_data !== mregs[r]) begin
        failures++; $display("FAIL %s: R%0d=%0d exp %0d", name, r, dbg_data, mregs[r]);
      end
    end
    checks++;
    if ({sign_flag, zero_flag, carry_flag} !== {msign, mzero, mcarry}) begin
      failures++; $display("FAIL %s: flags %b%b%b exp %b%b%b", name, sign_flag, zero_flag, carry_flag, msign, mzero, mcarry);
    end
  endtask

  // load a 16-bit constant into rd with LHI + LLI
  task automatic emit_const(logic [2:0] rd, logic [15:0] v);
    prog.push_back(enc_load(OP_LHI, rd, v[15:8]));
    prog.push_back(enc_load(OP_LLI, rd, v[7:0]));
  endtask

  // data words that would overwrite every register if fetched
  task automatic emit_data();
    for (int r = 0; r < 8; r++) prog.push_back(enc_load(OP_LLI, 3'(r), 8'hEE));
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // 1. published operation sequence, both operands 513
    prog.delete();
    for (int r = 1; r <= 7; r++) emit_const(3'(r), 16'd513);
    prog.push_back(enc_reg(OP_MUL, 3'd7, 3'd1));
    prog.push_back(enc_reg(OP_XOR, 3'd7, 3'd2));
    prog.push_back(enc_reg(OP_LS,  3'd7, 3'd3));
    prog.push_back(enc_reg(OP_RS,  3'd7, 3'd4));
    prog.push_back(enc_reg(OP_SUM, 3'd7, 3'd5));
    prog.push_back(enc_reg(OP_HLT, 3'd0, 3'd0));
    emit_data();
    run_program("trace", 8);
    begin
      automatic logic [15:0] exp [1:5] = '{16'd1, 16'd0, 16'd1026, 16'd256, 16'd1026};
      for (int r = 1; r <= 5; r++) begin
        dbg_addr = 3'(r); #1; checks++;
        if (dbg_data !== exp[r]) begin failures++; $display("FAIL trace R%0d=%0d exp %0d", r, dbg_data, exp[r]); end
      end
    end

    // 2. three-tap convolution of an 8-sample signal
    begin
      logic [7:0] x [8], h [3];
      logic [15:0] y;
      h = '{8'd3, 8'd5, 8'd2};
      for (int i = 0; i < 8; i++) x[i] = 8'(10 * i + 7);
      for (int n = 2; n < 8; n++) begin
        prog.delete();
        // R0 accumulator, R1 sample, R2 tap
        emit_const(3'd0, 16'd0);
        for (int k = 0; k < 3; k++) begin
          emit_const(3'd1, 16'(x[n-k]));
          emit_const(3'd2, 16'(h[k]));
          prog.push_back(enc_reg(OP_MUL, 3'd2, 3'd1));
          prog.push_back(enc_reg(OP_SUM, 3'd1, 3'd0));
        end
        prog.push_back(enc_reg(OP_HLT, 3'd0, 3'd0));
        emit_data();
        run_program($sformatf("conv y[%0d]", n), 8);
        y = 16'(h[0] * x[n] + h[1] * x[n-1] + h[2] * x[n-2]);
        dbg_addr = 3'd0; #1; checks++;
        if (dbg_data !== y) begin failures++; $display("FAIL conv y[%0d]=%0d exp %0d", n, dbg_data, y); end
      end
    end

    // 3. random programs
    for (int t = 0; t < 40; t++) begin
      automatic int len = $urandom_range(4, 60);
      prog.delete();
      for (int i = 0; i < 8; i++) emit_const(3'(i), 16'($urandom));
      for (int i = 0; i < len; i++) begin
        automatic logic [4:0] o = 5'($urandom_range(0, 15));
        if (o == 5'd7) o = 5'd6;      // HLT only at the end
        prog.push_back({o, 11'($urandom)});
      end
      prog.push_back(enc_reg(OP_HLT, 3'($urandom), 3'($urandom)));
      emit_data();
      run_program($sformatf("random %0d", t), 8);
    end

    // every mechanism must have happened
    for (int o = 0; o < 8; o++) begin
      checks++;
      if (n_op[o] == 0) begin failures++; $display("FAIL opcode %0d never ran", o); end
    end
    checks++; if (n_carry == 0)     begin failures++; $display("FAIL no SUM carry"); end
    checks++; if (n_zero == 0)      begin failures++; $display("FAIL no zero result"); end
    checks++; if (n_neg == 0)       begin failures++; $display("FAIL no negative result"); end
    checks++; if (n_halt_data == 0) begin failures++; $display("FAIL no halt before data"); end
    $display("mechanisms: LHI %0d LLI %0d MUL %0d XOR %0d LS %0d RS %0d SUM %0d HLT %0d carry %0d zero %0d negative %0d halt-before-data %0d",
             n_op[0], n_op[1], n_op[2], n_op[3], n_op[4], n_op[5], n_op[6], n_op[7],
             n_carry, n_zero, n_neg, n_halt_data);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
