// tb_mpld_xor_adder16: N-bit ripple-carry adders, N = 1..16, on a fabric with
// three counters and three feedback flip-flops, sized for 16 bits (32
// complemented inputs a_i, b_i; 17 targets; 125 x 48 ReRAM).
//
// The testbench generates each program itself. For bit i the carry
// c(i+1) = a_i b_i ^ a_i c_i ^ b_i c_i is computed on counter i mod 3 and kept
// in that counter's feedback flip-flop; the sum s_i = a_i ^ b_i ^ c_i is
// computed on counter (i+2) mod 3. Each counter executes its operations in
// order (carry part, then sum part, with a clear between parts); a greedy list
// scheduler places every operation in the earliest cycle in which its carry
// literal is already captured and, for a store, no other store uses the
// cycle. The resulting number of cycles is compared with the closed form
// D_1 = 3, D_N = D_(N-1) + 3 if (N-1) mod 3 != 2, else D_(N-1) + 2 (43 for
// N = 16), and every sum is compared with A + B for fixed and random operands,
// among them A = 0x5555, B = 0x3333 and a carry through all bits.
module tb_mpld_xor_adder16;
  import mpld_pkg::*;
  import mpld_prog_pkg::*;

  localparam int NB = 16, N_IN = 2 * NB, K = 3, N_FB = 3, N_TM = NB + 1;
  localparam int L = N_IN + N_FB, ROWS = 125, COLS = 48;

  typedef enum int {OP_AB, OP_AC, OP_BC, OP_A, OP_B, OP_C, OP_CLR} kind_t;
  typedef struct {
    kind_t kind;
    int    bi;     // bit index
    bit    cap;    // capture the counter into its feedback flip-flop
    bit    st;     // store the counter's result
  } op_t;

  logic            clk = 1'b0;
  logic            rst = 1'b1;
  logic [N_IN-1:0] in = '0;
  logic            prog_we = 1'b0;
  logic [5:0]      prog_col = '0;
  logic [ROWS-1:0] prog_data = '0;
  logic [N_TM-1:0] tm_state;
  logic [K-1:0]    cnt_q, cnt_qn, term;
  logic            busy;

  mpld_xor #(.N_IN(N_IN), .K(K), .N_FB(N_FB), .DUAL_RAIL(1'b0), .N_TM(N_TM),
             .ROWS(ROWS), .COLS(COLS)) dut (
    .clk, .rst, .in, .prog_we, .prog_col, .prog_data,
    .tm_state, .cnt_q, .cnt_qn, .term, .busy
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int store_bit [N_TM];   // which sum bit (NB-style index, n = carry out) each target gets
  int n_stores;

  function automatic longint unsigned la(int i);  return 64'(1) << (2 * i);     endfunction
  function automatic longint unsigned lb(int i);  return 64'(1) << (2 * i + 1); endfunction
  function automatic longint unsigned lfb(int f); return 64'(1) << (N_IN + f);  endfunction

  function automatic int closed_form(int n);
    int d = 3;
    for (int m = 2; m <= n; m++) d += (((m - 1) % 3) != 2) ? 3 : 2;
    return d;
  endfunction

  // Builds the n-bit adder program; returns its number of cycles.
  function automatic int build(mpld_prog pr, int n);
    op_t ops [K][$];
    int  ptr [K];
    int  cap_t [NB+1];
    bit  cap_ok [NB+1];
    int  t;
    for (int i = 0; i < n; i++) begin
      int jc = i % K, js = (i + 2) % K;
      if (ops[jc].size() > 0) ops[jc].push_back('{OP_CLR, i, 1'b0, 1'b0});
      if (i == 0) ops[jc].push_back('{OP_AB, i, 1'b1, n == 1});
      else begin
        ops[jc].push_back('{OP_AB, i, 1'b0, 1'b0});
        ops[jc].push_back('{OP_AC, i, 1'b0, 1'b0});
        ops[jc].push_back('{OP_BC, i, 1'b1, i == n - 1});
      end
      if (ops[js].size() > 0) ops[js].push_back('{OP_CLR, i, 1'b0, 1'b0});
      ops[js].push_back('{OP_A, i, 1'b0, 1'b0});
      if (i == 0) ops[js].push_back('{OP_B, i, 1'b0, 1'b1});
      else begin
        ops[js].push_back('{OP_B, i, 1'b0, 1'b0});
        ops[js].push_back('{OP_C, i, 1'b0, 1'b1});
      end
    end
    foreach (cap_ok[i]) cap_ok[i] = 1'b0;
    cap_ok[0] = 1'b1; cap_t[0] = 0;        // no carry into bit 0
    foreach (ptr[j]) ptr[j] = 0;
    n_stores = 0;
    pr.init(1);
    t = 2;
    while (ptr[0] < ops[0].size() || ptr[1] < ops[1].size() || ptr[2] < ops[2].size()) begin
      bit store_used = 1'b0;
      int order [K];
      // counters in order of the bit index of their next operation
      for (int j = 0; j < K; j++) order[j] = j;
      for (int a = 0; a < K; a++) for (int b = 0; b < K - 1 - a; b++) begin
        int ka = (ptr[order[b]]   < ops[order[b]].size())   ? ops[order[b]][ptr[order[b]]].bi     : 999;
        int kb = (ptr[order[b+1]] < ops[order[b+1]].size()) ? ops[order[b+1]][ptr[order[b+1]]].bi : 999;
        if (kb < ka) begin int tmp = order[b]; order[b] = order[b+1]; order[b+1] = tmp; end
      end
      for (int oi = 0; oi < K; oi++) begin
        int  j = order[oi];
        op_t op;
        bit  needs_c;
        if (ptr[j] >= ops[j].size()) continue;
        op = ops[j][ptr[j]];
        needs_c = (op.kind == OP_AC || op.kind == OP_BC || op.kind == OP_C);
        if (needs_c && !(cap_ok[op.bi] && cap_t[op.bi] < t)) continue;
        if (op.st && store_used) continue;
        case (op.kind)
          OP_AB:  pr.term(t, j, la(op.bi) | lb(op.bi));
          OP_AC:  pr.term(t, j, la(op.bi) | lfb((op.bi - 1) % K));
          OP_BC:  pr.term(t, j, lb(op.bi) | lfb((op.bi - 1) % K));
          OP_A:   pr.term(t, j, la(op.bi));
          OP_B:   pr.term(t, j, lb(op.bi));
          OP_C:   pr.term(t, j, lfb((op.bi - 1) % K));
          OP_CLR: pr.clr(t, j);
          default: ;
        endcase
        if (op.cap) begin
          pr.sig(t, j);
          cap_ok[op.bi + 1] = 1'b1;
          cap_t[op.bi + 1]  = t;
        end
        if (op.st) begin
          store_used = 1'b1;
          // s_0 has two inverted terms (result on Q, store ~Q); every other
          // result has an odd number (result on ~Q, store Q)
          pr.store(t, j, op.kind == OP_B && op.bi == 0);
          store_bit[n_stores] = (op.kind == OP_AB || op.kind == OP_BC) ? n : op.bi;
          n_stores++;
        end
        ptr[j]++;
      end
      t++;
    end
    return t - 1;
  endfunction

  task automatic run_add(int n, logic [NB-1:0] a, logic [NB-1:0] b);
    logic [NB:0]     am = '0, bm = '0, s;
    logic [N_IN-1:0] x = '0;
    for (int i = 0; i < n; i++) begin
      x[2*i] = a[i]; x[2*i+1] = b[i];
      am[i] = a[i];  bm[i] = b[i];
    end
    s = am + bm;    // expected sum of the n-bit operands
    @(negedge clk);
    in = x; rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    do @(negedge clk); while (busy);
    for (int k = 0; k < n_stores; k++) begin
      checks++;
      if (tm_state[k] !== s[store_bit[k]]) begin
        failures++;
        $display("FAIL n=%0d a=%h b=%h target %0d (sum bit %0d) = %b", n, a, b, k, store_bit[k], tm_state[k]);
      end
    end
  endtask

  initial begin
    for (int n = 1; n <= NB; n++) begin
      mpld_prog pr;
      int d;
      logic [NB-1:0] ones;
      pr = new(K, N_FB, L, ROWS, COLS);
      d = build(pr, n);
      checks += 2;
      if (d != closed_form(n)) begin
        failures++;
        $display("FAIL n=%0d takes %0d cycles, closed form %0d", n, d, closed_form(n));
      end
      if (n_stores != n + 1) begin failures++; $display("FAIL n=%0d stores %0d", n, n_stores); end
      if (n == NB) $display("16-bit adder: %0d cycles, %0d of %0d x %0d ReRAM cells in LRS", d, pr.lrs_cells(), ROWS, COLS);
      for (int c = 0; c < COLS; c++) begin
        @(negedge clk);
        prog_we = 1'b1; prog_col = 6'(c); prog_data = pr.word(c)[ROWS-1:0];
      end
      @(negedge clk);
      prog_we = 1'b0;
      ones = '1;
      run_add(n, 16'h5555, 16'h3333);
      run_add(n, ones, 16'h0001);
      run_add(n, '0, '0);
      repeat (6) run_add(n, NB'($urandom), NB'($urandom));
    end
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
