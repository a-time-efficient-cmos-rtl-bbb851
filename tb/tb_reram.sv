// tb_reram: programs a 64 x 16 control ReRAM with random columns, reads every
// column through a one-hot column drive, checks that no column reads when none
// is driven, and that two driven columns read as the OR of their words.
module tb_reram;
  localparam int ROWS = 64, COLS = 16;
  logic            clk = 1'b0;
  logic [COLS-1:0] col_sel = '0;
  logic [ROWS-1:0] rd_data;
  logic            prog_we = 1'b0;
  logic [3:0]      prog_col = '0;
  logic [ROWS-1:0] prog_data = '0;
  logic [ROWS-1:0] ref_mem [COLS];
  int checks = 0, failures = 0;

  reram #(.ROWS(ROWS), .COLS(COLS)) dut (.clk, .col_sel, .rd_data, .prog_we, .prog_col, .prog_data);

  always #5 clk = ~clk;

  initial begin
    for (int c = 0; c < COLS; c++) begin
      ref_mem[c] = {$urandom, $urandom};
      @(negedge clk);
      prog_we = 1'b1; prog_col = 4'(c); prog_data = ref_mem[c];
    end
    @(negedge clk);
    prog_we = 1'b0;
    for (int c = 0; c < COLS; c++) begin
      col_sel = COLS'(1) << c;
      #1;
      checks++;
      if (rd_data !== ref_mem[c]) begin failures++; $display("FAIL column %0d", c); end
    end
    col_sel = '0; #1;
    checks++;
    if (rd_data !== '0) begin failures++; $display("FAIL idle read"); end
    col_sel = 16'h0081; #1;
    checks++;
    if (rd_data !== (ref_mem[0] | ref_mem[7])) begin failures++; $display("FAIL two columns"); end
    // rewrite one column and read it back
    @(negedge clk);
    ref_mem[5] = ~ref_mem[5];
    prog_we = 1'b1; prog_col = 4'd5; prog_data = ref_mem[5];
    @(negedge clk);
    prog_we = 1'b0; col_sel = 16'h0020; #1;
    checks++;
    if (rd_data !== ref_mem[5]) begin failures++; $display("FAIL rewrite"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
