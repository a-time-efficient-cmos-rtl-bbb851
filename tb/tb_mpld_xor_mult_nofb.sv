// tb_mpld_xor_mult_nofb: a 3-bit multiplier on the fabric without feedback
// (6 complemented inputs, 3 counters, 6 targets, 35 x 16 ReRAM). Without
// feedback every product bit is a two-level XOR of products; the testbench
// uses the positive-polarity Reed-Muller form of each bit (1, 2, 4, 8, 9 and
// 3 products for p0..p5). Schedule (cycle 1 clears everything):
//   counter 1: p4 in cycles 2-10, stored in cycle 10
//   counter 2: p3 in cycles 2-9 (store 9), clear 10, p2 in 11-14 (store 14)
//   counter 3: p0 in cycle 2 (store 2), clear 3, p1 in 4-5 (store 5),
//              clear 6, p5 in cycles 7, 8, 11 (store 11)
// Targets receive p0, p1, p3, p4, p5, p2; the last store is in cycle 14.
// All 64 operand pairs are checked against a*b.
module tb_mpld_xor_mult_nofb;
  import mpld_pkg::*;
  import mpld_prog_pkg::*;

  localparam int N_IN = 6, K = 3, N_TM = 6, ROWS = 35, COLS = 16;

  logic            clk = 1'b0;
  logic            rst = 1'b1;
  logic [N_IN-1:0] in = '0;
  logic            prog_we = 1'b0;
  logic [3:0]      prog_col = '0;
  logic [ROWS-1:0] prog_data = '0;
  logic [N_TM-1:0] tm_state;
  logic [K-1:0]    cnt_q, cnt_qn, term;
  logic            busy;

  mpld_xor #(.N_IN(N_IN), .K(K), .N_FB(0), .DUAL_RAIL(1'b0), .N_TM(N_TM),
             .ROWS(ROWS), .COLS(COLS)) dut (
    .clk, .rst, .in, .prog_we, .prog_col, .prog_data,
    .tm_state, .cnt_q, .cnt_qn, .term, .busy
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0, last_store = 0;

  always @(posedge clk) if (busy) begin
    cyc <= cyc + 1;
    if (dut.ctrl) last_store <= cyc + 1;
  end

  initial begin
    mpld_prog pr;
    static longint unsigned p4t [9] = '{A2|B2, A1|A2|B0|B1, A0|A1|A2|B0|B2, A0|A1|B1|B2, A1|A2|B1|B2,
                                 A0|A1|A2|B1|B2, A0|A2|B0|B1|B2, A1|A2|B0|B1|B2, A0|A1|A2|B0|B1|B2};
    static longint unsigned p3t [8] = '{A2|B1, A0|A1|B0|B1, A1|A2|B0|B1, A0|A1|A2|B0|B1, A1|B2,
                                 A0|A2|B0|B2, A0|A1|B1|B2, A0|A1|B0|B1|B2};
    static longint unsigned p2t [4] = '{A2|B0, A1|B1, A0|A1|B0|B1, A0|B2};
    static longint unsigned p5t [3] = '{A0|A1|A2|B0|B2, A1|A2|B1|B2, A0|A2|B0|B1|B2};
    static int p5c [3] = '{7, 8, 11};
    pr = new(K, 0, N_IN, ROWS, COLS);
    pr.init(1);
    foreach (p4t[i]) pr.term(2 + i, 0, p4t[i]);
    pr.store(10, 0, 1'b0);                       // 9 inverted terms: result on ~Q
    foreach (p3t[i]) pr.term(2 + i, 1, p3t[i]);
    pr.store(9, 1, 1'b1);                        // 8 terms: result on Q
    pr.clr(10, 1);
    foreach (p2t[i]) pr.term(11 + i, 1, p2t[i]);
    pr.store(14, 1, 1'b1);
    pr.term(2, 2, A0 | B0);  pr.store(2, 2, 1'b0);
    pr.clr(3, 2);
    pr.term(4, 2, A1 | B0);  pr.term(5, 2, A0 | B1);  pr.store(5, 2, 1'b1);
    pr.clr(6, 2);
    foreach (p5t[i]) pr.term(p5c[i], 2, p5t[i]);
    pr.store(11, 2, 1'b0);
    for (int c = 0; c < COLS; c++) begin
      @(negedge clk);
      prog_we = 1'b1; prog_col = 4'(c); prog_data = pr.word(c)[ROWS-1:0];
    end
    @(negedge clk);
    prog_we = 1'b0;
    for (int a = 0; a < 8; a++) for (int b = 0; b < 8; b++) begin
      int p;
      in = pack_ab(a, b); rst = 1'b1;
      @(negedge clk);
      rst = 1'b0; cyc = 0; last_store = 0;
      do @(negedge clk); while (busy);
      p = a * b;
      checks += 2;
      // targets o1..o6 = p0 p1 p3 p4 p5 p2
      if (tm_state !== {p[2], p[5], p[4], p[3], p[1], p[0]}) begin
        failures++;
        $display("FAIL %0d*%0d: targets %b", a, b, tm_state);
      end
      if (last_store != 14) begin failures++; $display("FAIL last store in cycle %0d", last_store); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
