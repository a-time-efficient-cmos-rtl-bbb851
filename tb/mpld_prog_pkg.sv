// mpld_prog_pkg: testbench helper that assembles control programs (ReRAM
// images) for the mPLD-XOR fabric from a readable list of XOR terms.
//
// Columns are numbered from 1, as clock cycles are. A term is given as a mask
// over the input lines of a counter (bit i = line i); the selected lines are
// ORed by the diode OR gate in that cycle. Every column starts with all
// transmission gates off (P = 0, ~P = 1) and nothing else asserted.
package mpld_prog_pkg;
  import mpld_pkg::*;

  localparam int MAXROWS = 256;

  class mpld_prog;
    int k, nfb, lines, rows, cols;
    logic [MAXROWS-1:0] img [];

    function new(int k_, int nfb_, int lines_, int rows_, int cols_);
      k = k_; nfb = nfb_; lines = lines_; rows = rows_; cols = cols_;
      img = new[cols];
      foreach (img[c]) begin
        img[c] = '0;
        for (int g = 0; g < 2 * k; g++) img[c][row_pn(k, g)] = 1'b1;
      end
    endfunction

    // Clear every counter and reset the output array (first column).
    function void init(int col);
      img[col-1][row_clr0()] = 1'b1;
      for (int j = 0; j < k; j++) img[col-1][row_clr(j)] = 1'b1;
    endfunction

    function void clr(int col, int j);
      img[col-1][row_clr(j)] = 1'b1;
    endfunction

    function void term(int col, int j, longint unsigned mask);
      for (int i = 0; i < lines; i++)
        if (mask[i]) img[col-1][row_sel(k, nfb, lines, j) + i] = 1'b1;
    endfunction

    // Store counter j: through its ~Q rail if neg, else its Q rail.
    function void store(int col, int j, bit neg);
      int g = 2 * j + (neg ? 1 : 0);
      img[col-1][row_ctrl()]  = 1'b1;
      img[col-1][row_p(k, g)]  = 1'b1;
      img[col-1][row_pn(k, g)] = 1'b0;
    endfunction

    function void sig(int col, int f);
      img[col-1][row_sig(k, f)] = 1'b1;
    endfunction

    function logic [MAXROWS-1:0] word(int c0);
      return img[c0];
    endfunction

    // Number of set cells in the image (ReRAM cells in LRS).
    function int lrs_cells();
      int n = 0;
      foreach (img[c]) for (int r = 0; r < rows; r++) n += int'(img[c][r]);
      return n;
    endfunction
  endclass

  // Line masks of the 3-bit examples: inputs in = {b2,a2,b1,a1,b0,a0} drive
  // the complemented lines 0..5; feedback lines follow.
  localparam longint unsigned A0 = 64'h01, B0 = 64'h02, A1 = 64'h04,
                              B1 = 64'h08, A2 = 64'h10, B2 = 64'h20,
                              FB0 = 64'h40, FB1 = 64'h80, FB2 = 64'h100;

  // 3-bit adder of eq. (4): S0 on counter 0 (cycles 2-3), S1 on counter 0
  // (5-7), S2 on counter 1 (2-6), Co on counter 2 (2-8). Targets receive
  // S0, S2, S1, Co in this order.
  function automatic void build_adder(mpld_prog pr);
    pr.init(1);
    // S0 = a0 ^ b0 : two literal terms, result on Q, store ~Q
    pr.term(2, 0, A0);  pr.term(3, 0, B0);  pr.store(3, 0, 1'b1);
    pr.clr(4, 0);
    // S1 = a1 ^ b1 ^ a0 b0 : three terms, result on ~Q, store Q
    pr.term(5, 0, A1);  pr.term(6, 0, B1);  pr.term(7, 0, A0 | B0);
    pr.store(7, 0, 1'b0);
    // S2 : five terms
    pr.term(2, 1, A2);  pr.term(3, 1, B2);  pr.term(4, 1, A1 | B1);
    pr.term(5, 1, A1 | A0 | B0);  pr.term(6, 1, B1 | A0 | B0);
    pr.store(6, 1, 1'b0);
    // Co : seven terms
    pr.term(2, 2, A2 | B2);            pr.term(3, 2, A2 | A1 | B1);
    pr.term(4, 2, A2 | A1 | A0 | B0);  pr.term(5, 2, A2 | B1 | A0 | B0);
    pr.term(6, 2, B2 | A1 | B1);       pr.term(7, 2, B2 | A1 | A0 | B0);
    pr.term(8, 2, B2 | B1 | A0 | B0);
    pr.store(8, 2, 1'b0);
  endfunction

  // 3-bit multiplier with feedback (needs 3 feedback lines). Internal signals:
  // IP0 = a2b0 ^ a1b1 ^ a0a1b0b1 (counter 0, kept in feedback 0) and
  // IC0 = a0a1b0b1 ^ a1a2b0b1 ^ a0a1a2b0b1 (counter 1, kept in feedback 1).
  // Counter 0 then finishes P3 = IP0 ^ a0b2, computes P6 and P1; counter 1
  // finishes P4 = IC0 ^ a2b1 ^ a1b2 ^ IP0 a0b2 and computes P2; counter 2
  // computes P5 = a2b2 ^ a1a2b1b2 ^ a1a2b0b1 ^ a0a1a2b0b1b2 ^ IP0 a0a2b1b2
  //               ^ IC0 a1b2 ^ IP0 a0a1b2.
  // Product bit i is P(i+1). Targets receive P3, P4, P5, P6, P2, P1 in this
  // order; the last store is in cycle 11.
  function automatic void build_multiplier(mpld_prog pr);
    pr.init(1);
    // counter 0
    pr.term(2, 0, A2 | B0);  pr.term(3, 0, A1 | B1);  pr.term(4, 0, A0 | A1 | B0 | B1);
    pr.sig(4, 0);
    pr.term(5, 0, A0 | B2);  pr.store(5, 0, 1'b1);                       // P3
    pr.clr(6, 0);
    pr.term(7, 0, A0 | A1 | A2 | B0 | B2);  pr.term(8, 0, A1 | A2 | B1 | B2);
    pr.term(9, 0, A0 | A2 | B0 | B1 | B2);  pr.store(9, 0, 1'b0);       // P6
    pr.clr(10, 0);
    pr.term(11, 0, A0 | B0);  pr.store(11, 0, 1'b0);                     // P1
    // counter 1
    pr.term(2, 1, A0 | A1 | B0 | B1);  pr.term(3, 1, A1 | A2 | B0 | B1);
    pr.term(4, 1, A0 | A1 | A2 | B0 | B1);  pr.sig(4, 1);
    pr.term(5, 1, A2 | B1);  pr.term(6, 1, A1 | B2);  pr.term(7, 1, FB0 | A0 | B2);
    pr.store(7, 1, 1'b1);                                                // P4
    pr.clr(8, 1);
    pr.term(9, 1, A1 | B0);  pr.term(10, 1, A0 | B1);  pr.store(10, 1, 1'b1); // P2
    // counter 2
    pr.term(2, 2, A2 | B2);  pr.term(3, 2, A1 | A2 | B1 | B2);
    pr.term(4, 2, A1 | A2 | B0 | B1);  pr.term(5, 2, A0 | A1 | A2 | B0 | B1 | B2);
    pr.term(6, 2, FB0 | A0 | A2 | B1 | B2);  pr.term(7, 2, FB1 | A1 | B2);
    pr.term(8, 2, FB0 | A0 | A1 | B2);  pr.store(8, 2, 1'b0);            // P5
  endfunction

  // Operand packing of the 3-bit examples.
  function automatic logic [5:0] pack_ab(int a, int b);
    logic [5:0] v;
    for (int i = 0; i < 3; i++) begin
      v[2*i]   = a[i];
      v[2*i+1] = b[i];
    end
    return v;
  endfunction
endpackage
