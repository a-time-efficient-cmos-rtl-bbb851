// tb_mpld_xor_dual: the fabric with dual-rail inputs (lines In_1, ~In_1,
// In_2, ~In_2, ...) and no feedback: 4 inputs, 2 counters, 2 targets, a 28 x 16
// ReRAM. Random generalized ESOP programs are generated: each counter gets a
// random number of terms, each term a random sum of true and complemented
// literals; counter 0 is stored through its Q rail and counter 1 through ~Q in
// the last cycle. Every program is run for all 16 input combinations and the
// targets are compared with the XOR of the terms computed in the testbench
// (a target holds the complement of the rail applied to it).
module tb_mpld_xor_dual;
  import mpld_pkg::*;
  import mpld_prog_pkg::*;

  localparam int N_IN = 4, K = 2, N_TM = 2, ROWS = 28, COLS = 16;
  localparam int L = 2 * N_IN;

  logic            clk = 1'b0;
  logic            rst = 1'b1;
  logic [N_IN-1:0] in = '0;
  logic            prog_we = 1'b0;
  logic [3:0]      prog_col = '0;
  logic [ROWS-1:0] prog_data = '0;
  logic [N_TM-1:0] tm_state;
  logic [K-1:0]    cnt_q, cnt_qn, term;
  logic            busy;

  mpld_xor #(.N_IN(N_IN), .K(K), .N_FB(0), .DUAL_RAIL(1'b1), .N_TM(N_TM),
             .ROWS(ROWS), .COLS(COLS)) dut (
    .clk, .rst, .in, .prog_we, .prog_col, .prog_data,
    .tm_state, .cnt_q, .cnt_qn, .term, .busy
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (20) begin
      mpld_prog pr;
      logic [L-1:0] masks [K][COLS];
      int last;
      pr = new(K, 0, L, ROWS, COLS);
      pr.init(1);
      last = 2 + $urandom % (COLS - 3);
      for (int j = 0; j < K; j++)
        for (int c = 2; c <= last; c++) begin
          masks[j][c-1] = ($urandom % 3 == 0) ? '0 : L'($urandom) & L'($urandom);
          pr.term(c, j, 64'(masks[j][c-1]));
        end
      pr.store(last, 0, 1'b0);
      // the second store needs its own cycle: counter 1 adds no term after 'last'
      pr.store(last + 1, 1, 1'b1);
      for (int c = 0; c < COLS; c++) begin
        @(negedge clk);
        prog_we = 1'b1; prog_col = 4'(c); prog_data = pr.word(c)[ROWS-1:0];
      end
      @(negedge clk);
      prog_we = 1'b0;
      for (int v = 0; v < 16; v++) begin
        logic [L-1:0] lines;
        bit par [K];
        for (int i = 0; i < N_IN; i++) begin
          lines[2*i] = v[i]; lines[2*i+1] = ~v[i];
        end
        for (int j = 0; j < K; j++) begin
          par[j] = 1'b0;
          for (int c = 2; c <= last; c++) par[j] ^= |(masks[j][c-1] & lines);
        end
        @(negedge clk);
        in = 4'(v); rst = 1'b1;
        @(negedge clk);
        rst = 1'b0;
        do @(negedge clk); while (busy);
        checks += 2;
        if (tm_state[0] !== ~par[0]) begin failures++; $display("FAIL target 0 v=%0d", v); end
        if (tm_state[1] !== par[1])  begin failures++; $display("FAIL target 1 v=%0d", v); end
      end
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
