// tb_mpld_xor_adder: the fabric without feedback, sized as the 3-bit adder
// example: 6 complemented inputs, 3 counters, 4 targets and a 35 x 8 ReRAM
// (17 control rows plus one 6-row field per counter), running the adder of
// eq. (4) for all 64 operand pairs. The targets must read S0, S2, S1, Co, the
// last store must happen in cycle 8, and the stores must come in cycles 3, 6,
// 7 and 8.
module tb_mpld_xor_adder;
  import mpld_pkg::*;
  import mpld_prog_pkg::*;

  localparam int N_IN = 6, K = 3, N_TM = 4, ROWS = 35, COLS = 8;

  logic            clk = 1'b0;
  logic            rst = 1'b1;
  logic [N_IN-1:0] in = '0;
  logic            prog_we = 1'b0;
  logic [2:0]      prog_col = '0;
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
  int cyc = 0;
  logic [7:0] store_cycles;

  always @(posedge clk) if (busy) begin
    cyc <= cyc + 1;
    if (dut.ctrl) store_cycles[cyc] <= 1'b1;
  end

  initial begin
    mpld_prog add;
    int s;
    add = new(K, 0, N_IN, ROWS, COLS);
    build_adder(add);
    for (int c = 0; c < COLS; c++) begin
      @(negedge clk);
      prog_we = 1'b1; prog_col = 3'(c); prog_data = add.word(c)[ROWS-1:0];
    end
    @(negedge clk);
    prog_we = 1'b0;
    for (int a = 0; a < 8; a++) for (int b = 0; b < 8; b++) begin
      in = pack_ab(a, b); rst = 1'b1;
      @(negedge clk);
      rst = 1'b0; cyc = 0; store_cycles = '0;
      do @(negedge clk); while (busy);
      s = a + b;
      checks++;
      if (tm_state !== {s[3], s[1], s[2], s[0]}) begin
        failures++;
        $display("FAIL %0d+%0d: targets %b", a, b, tm_state);
      end
      checks++;
      // cycles 3, 6, 7, 8 are bits 2, 5, 6, 7
      if (store_cycles !== 8'b1110_0100) begin
        failures++;
        $display("FAIL store cycles %b", store_cycles);
      end
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
