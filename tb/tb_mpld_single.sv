// tb_mpld_single: the single-output mPLD-XOR built from its parts: a 16-bit
// memory-driver shifter, a 64 x 16 control ReRAM holding only the select bits
// C1..C64, and one 64-line channel for 32 inputs in dual rail (C_{2i-1} on
// In_i, C_{2i} on ~In_i). CLR is driven by the testbench.
//
// Part 1 replays the published example: all inputs 0; column 1 selects
// nothing; columns 2, 3 and 4 each select at least one complemented input,
// so the counter toggles in exactly those three cycles and ends high.
// Part 2 loads random programs and checks the counter after all 16 columns
// against the XOR of the column terms for random inputs.
module tb_mpld_single;
  localparam int N = 32, L = 2 * N, COLS = 16;

  logic            clk = 1'b0, rst = 1'b1, clr = 1'b0;
  logic [COLS-1:0] col_sel;
  logic            busy;
  logic [L-1:0]    word, line;
  logic [N-1:0]    in = '0;
  logic            prog_we = 1'b0;
  logic [3:0]      prog_col = '0;
  logic [L-1:0]    prog_data = '0;
  logic            k, q, qn, q_nx;
  logic [L-1:0]    img [COLS];
  int checks = 0, failures = 0;
  int cyc = 0;
  logic [COLS-1:0] toggled;

  for (genvar i = 0; i < N; i++) begin : g_line
    assign line[2*i]   = in[i];
    assign line[2*i+1] = ~in[i];
  end

  mem_driver #(.COLS(COLS)) u_mdrv (.clk, .rst, .col_sel, .busy);
  reram #(.ROWS(L), .COLS(COLS)) u_mem (
    .clk, .col_sel, .rd_data(word), .prog_we, .prog_col, .prog_data
  );
  xor_slice #(.L(L)) u_ch (
    .clk, .en(busy), .sel(word), .line, .clr, .k, .q, .qn, .q_nx
  );

  always #5 clk = ~clk;

  always @(posedge clk) if (busy) begin
    cyc <= cyc + 1;
    if (k && !clr) toggled[cyc] <= 1'b1;
  end

  function automatic logic [L-1:0] c_bit(int j);   // row C_j, 1-based
    return L'(1) << (j - 1);
  endfunction

  task automatic load;
    for (int c = 0; c < COLS; c++) begin
      @(negedge clk);
      prog_we = 1'b1; prog_col = 4'(c); prog_data = img[c];
    end
    @(negedge clk);
    prog_we = 1'b0;
  endtask

  task automatic run;
    // clear the counter, then start the shifter
    @(negedge clk); clr = 1'b1; rst = 1'b1;
    @(negedge clk); clr = 1'b0; rst = 1'b0; cyc = 0; toggled = '0;
    do @(negedge clk); while (busy);
  endtask

  initial begin
    // part 1
    foreach (img[c]) img[c] = '0;
    img[1] = c_bit(2) | c_bit(4) | c_bit(L);
    img[2] = c_bit(2);
    img[3] = c_bit(2) | c_bit(3);
    load();
    in = '0;
    run();
    checks += 2;
    if (toggled !== 16'h000e) begin failures++; $display("FAIL toggle cycles %b", toggled); end
    if (q !== 1'b1)           begin failures++; $display("FAIL final Q=%b", q); end
    // part 2
    repeat (30) begin
      bit par;
      foreach (img[c]) img[c] = {$urandom, $urandom} & {$urandom, $urandom} & {$urandom, $urandom};
      load();
      repeat (4) begin
        in = {$urandom};
        #1;
        par = 1'b0;
        foreach (img[c]) par ^= |(img[c] & line);
        run();
        checks++;
        if (q !== par) begin failures++; $display("FAIL random program q=%b expected %b", q, par); end
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
