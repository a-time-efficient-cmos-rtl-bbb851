// tb_mpld_xor: end-to-end test of the mPLD-XOR fabric at its default size
// (6 inputs, 3 counters, 3 feedback flip-flops, 6 targets, 64 x 16 ReRAM).
//
// The ReRAM is loaded with the 3-bit multiplier program and the fabric is run
// for all 64 operand pairs; the six stored bits are compared with a*b. The
// fabric is then reprogrammed with the 3-bit adder and run for all pairs
// against a+b. Each run also checks when the last result is stored: cycle 8
// for the adder, at most cycle 12 for the multiplier (this program needs 11).
// The test counts how often each mechanism occurs (counter toggles, counter
// clears inside a program, feedback captures, feedback literals taking part in
// a term, stores through the Q and through the ~Q rail, all six targets
// written, reprogramming) and fails if one never happened.
module tb_mpld_xor;
  import mpld_pkg::*;
  import mpld_prog_pkg::*;

  localparam int N_IN = 6, K = 3, N_FB = 3, N_TM = 6, ROWS = 64, COLS = 16;
  localparam int L = N_IN + N_FB;

  logic            clk = 1'b0;
  logic            rst = 1'b1;
  logic [N_IN-1:0] in = '0;
  logic            prog_we = 1'b0;
  logic [3:0]      prog_col = '0;
  logic [ROWS-1:0] prog_data = '0;
  logic [N_TM-1:0] tm_state;
  logic [K-1:0]    cnt_q, cnt_qn, term;
  logic            busy;

  mpld_xor dut (
    .clk, .rst, .in, .prog_we, .prog_col, .prog_data,
    .tm_state, .cnt_q, .cnt_qn, .term, .busy
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_toggle = 0, n_clr_mid = 0, n_fb_cap = 0, n_fb_used = 0;
  int n_store_q = 0, n_store_qn = 0, n_full = 0, n_reprog = 0;
  int cyc = 0, last_store = 0;

  // mechanism counters, sampled in every cycle of a run
  always @(posedge clk) if (busy) begin
    cyc <= cyc + 1;
    n_toggle <= n_toggle + $countones(term);
    if (cyc > 0 && |dut.clr) n_clr_mid <= n_clr_mid + 1;
    n_fb_cap <= n_fb_cap + $countones(dut.g_fb.sig);
    for (int j = 0; j < K; j++)
      if (|dut.word[row_sel(K, N_FB, L, j) + N_IN +: N_FB]) n_fb_used <= n_fb_used + 1;
    if (dut.ctrl) begin
      last_store <= cyc + 1;
      for (int g = 0; g < 2 * K; g++) if (dut.p[g]) begin
        if (g % 2 == 0) n_store_q <= n_store_q + 1;
        else            n_store_qn <= n_store_qn + 1;
      end
      if (dut.tm_sel[N_TM-1]) n_full <= n_full + 1;
    end
  end

  task automatic load(mpld_prog pr);
    for (int c = 0; c < COLS; c++) begin
      @(negedge clk);
      prog_we = 1'b1; prog_col = 4'(c); prog_data = pr.word(c)[ROWS-1:0];
    end
    @(negedge clk);
    prog_we = 1'b0;
    n_reprog++;
  endtask

  task automatic run(logic [N_IN-1:0] x);
    @(negedge clk);
    in = x; rst = 1'b1;
    @(negedge clk);
    rst = 1'b0; cyc = 0; last_store = 0;
    do @(negedge clk); while (busy);
    checks++;
    if (cnt_qn !== ~cnt_q) begin
      failures++;
      $display("FAIL counter outputs Q=%b ~Q=%b", cnt_q, cnt_qn);
    end
  endtask

  task automatic check(string what, logic [N_TM-1:0] got, logic [N_TM-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    mpld_prog mul, add;
    logic [N_TM-1:0] exp;
    int p, s;

    mul = new(K, N_FB, L, ROWS, COLS);
    build_multiplier(mul);
    load(mul);
    for (int a = 0; a < 8; a++) for (int b = 0; b < 8; b++) begin
      run(pack_ab(a, b));
      p = a * b;
      exp = {p[0], p[1], p[5], p[4], p[3], p[2]};   // o6..o1 = P1 P2 P6 P5 P4 P3
      check($sformatf("mul %0d*%0d", a, b), tm_state, exp);
      checks++;
      if (last_store != 11 || last_store > 12) begin
        failures++;
        $display("FAIL mul last store in cycle %0d", last_store);
      end
    end

    add = new(K, N_FB, L, ROWS, COLS);
    build_adder(add);
    load(add);
    for (int a = 0; a < 8; a++) for (int b = 0; b < 8; b++) begin
      run(pack_ab(a, b));
      s = a + b;
      // targets o1..o4 = S0 S2 S1 Co; o5, o6 are not written and stay in LRS
      exp = {2'b11, s[3], s[1], s[2], s[0]};
      check($sformatf("add %0d+%0d", a, b), tm_state, exp);
      checks++;
      if (last_store != 8) begin
        failures++;
        $display("FAIL add last store in cycle %0d", last_store);
      end
    end

    $display("mechanisms: toggles=%0d clears=%0d fb_captures=%0d fb_literals=%0d store_q=%0d store_qn=%0d sixth_target=%0d programs=%0d",
             n_toggle, n_clr_mid, n_fb_cap, n_fb_used, n_store_q, n_store_qn, n_full, n_reprog);
    if (n_toggle == 0)  begin failures++; $display("FAIL no counter toggle"); end
    if (n_clr_mid == 0) begin failures++; $display("FAIL no counter clear inside a program"); end
    if (n_fb_cap == 0)  begin failures++; $display("FAIL no feedback capture"); end
    if (n_fb_used == 0) begin failures++; $display("FAIL no feedback literal used"); end
    if (n_store_q == 0) begin failures++; $display("FAIL no store through Q"); end
    if (n_store_qn == 0) begin failures++; $display("FAIL no store through ~Q"); end
    if (n_full == 0)    begin failures++; $display("FAIL sixth target never written"); end
    if (n_reprog < 2)   begin failures++; $display("FAIL fabric not reprogrammed"); end
    checks += 8;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
