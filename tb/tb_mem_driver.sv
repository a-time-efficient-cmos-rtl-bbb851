// tb_mem_driver: checks the one-hot column sequence of the 16-bit memory
// driver shifter: no column during reset, column c in the c-th cycle after
// reset, idle afterwards, and a restart in the middle of a run.
module tb_mem_driver;
  localparam int COLS = 16;
  logic            clk = 1'b0, rst = 1'b1;
  logic [COLS-1:0] col_sel;
  logic            busy;
  int checks = 0, failures = 0;

  mem_driver #(.COLS(COLS)) dut (.clk, .rst, .col_sel, .busy);

  always #5 clk = ~clk;

  task automatic expect_sel(logic [COLS-1:0] e);
    checks += 2;
    if (col_sel !== e)    begin failures++; $display("FAIL col_sel=%h expected %h", col_sel, e); end
    if (busy !== (e != 0)) begin failures++; $display("FAIL busy"); end
  endtask

  initial begin
    @(negedge clk); expect_sel('0);
    @(negedge clk); rst = 1'b0; #1;
    for (int c = 0; c < COLS; c++) begin
      expect_sel(COLS'(1) << c);
      @(negedge clk);
    end
    repeat (3) begin expect_sel('0); @(negedge clk); end
    // restart, then restart again after five columns
    rst = 1'b1; @(negedge clk); rst = 1'b0; #1;
    for (int c = 0; c < 5; c++) begin expect_sel(COLS'(1) << c); @(negedge clk); end
    rst = 1'b1; #1; expect_sel('0); @(negedge clk); rst = 1'b0; #1;
    expect_sel(COLS'(1));
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
