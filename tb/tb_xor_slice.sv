// tb_xor_slice: one single-output channel with 64 dual-rail lines (32 inputs
// In_i and their complements, C_{2i-1} on In_i and C_{2i} on ~In_i).
//
// Part 1 replays the single-output example: all inputs 0; the first control
// column selects nothing; columns 2, 3 and 4 each select at least one
// complemented input, so the counter toggles three times and ends high.
// Part 2 evaluates random XORs of random sums of literals and compares the
// counter with a parity computed in the testbench, clearing it between
// functions.
module tb_xor_slice;
  localparam int N = 32, L = 2 * N;
  logic         clk = 1'b0, en = 1'b0, clr = 1'b0;
  logic [L-1:0] sel = '0, line;
  logic [N-1:0] in = '0;
  logic         k, q, qn, q_nx;
  int checks = 0, failures = 0, toggles = 0;

  for (genvar i = 0; i < N; i++) begin : g_line
    assign line[2*i]   = in[i];
    assign line[2*i+1] = ~in[i];
  end

  xor_slice #(.L(L)) dut (.clk, .en, .sel, .line, .clr, .k, .q, .qn, .q_nx);

  always #5 clk = ~clk;
  always @(posedge clk) if (en && k && !clr) toggles++;

  // select bit of C_j (1-based, as printed on the control rows)
  function automatic logic [L-1:0] c_bit(int j);
    return L'(1) << (j - 1);
  endfunction

  initial begin
    bit par, tv;
    // part 1
    @(negedge clk);
    en = 1'b1; clr = 1'b1; sel = '0;                          // column 1: clear, no input
    @(negedge clk);
    clr = 1'b0;
    sel = c_bit(2) | c_bit(4) | c_bit(L);   @(negedge clk);   // column 2
    sel = c_bit(2);                         @(negedge clk);   // column 3
    sel = c_bit(2) | c_bit(3);              @(negedge clk);   // column 4 (C3 is In_2 = 0)
    sel = '0;
    checks += 2;
    if (toggles != 3) begin failures++; $display("FAIL example toggles=%0d", toggles); end
    if (q !== 1'b1 || qn !== 1'b0) begin failures++; $display("FAIL example q=%b", q); end
    // part 2
    repeat (60) begin
      int m;
      in = {$urandom};
      clr = 1'b1; @(negedge clk); clr = 1'b0;
      par = 1'b0;
      m = 1 + $urandom % 16;
      for (int t = 0; t < m; t++) begin
        sel = {$urandom, $urandom} & {$urandom, $urandom} & {$urandom, $urandom};
        tv = |(sel & line);
        #1;
        checks += 2;
        if (k !== tv) begin failures++; $display("FAIL term"); end
        if (q_nx !== (par ^ tv)) begin failures++; $display("FAIL q_nx"); end
        par ^= tv;
        @(negedge clk);
      end
      sel = '0;
      checks++;
      if (q !== par) begin failures++; $display("FAIL parity q=%b exp=%b", q, par); end
    end
    // the clock phase gates every line
    en = 1'b0; sel = '1; #1;
    checks++;
    if (k !== 1'b0) begin failures++; $display("FAIL term without clock phase"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
