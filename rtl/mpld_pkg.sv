// mpld_pkg: shared constants and row-map functions of the mPLD-XOR fabric.
//
// One column of the control ReRAM is the control word of one clock cycle.
// Its rows are laid out as follows (row 0 first), following the order of the
// control rows in the adder example: Ctrl, CLR0, CLR1..CLRk, then
// P1, ~P1, ..., P2k, ~P2k (one transmission-gate pair per counter rail), then,
// in the fabric with feedback, Sig1..Sig_f (one clock enable per feedback
// flip-flop), and finally one field of L select bits per counter. A field holds
// one bit per input line of that counter's diode OR: first the primary-input
// lines, then the feedback lines. With k = 3 this gives 35 rows without feedback
// and 47 rows with three feedback flip-flops, the sizes quoted for the 3-bit
// adder and 3-bit multiplier programs. The placement of the Sig rows and of the
// feedback lines inside each field is this design's own choice.
//
// Gate index g (0-based) of counter j: g = 2j drives the Q rail, g = 2j+1 the
// ~Q rail, so P1/~P1 pass Q of counter 1 and P2/~P2 pass ~Q of counter 1.
package mpld_pkg;

  // Number of diode-OR input lines per counter.
  function automatic int lines_per_counter(int n_in, bit dual_rail, int n_fb);
    return (dual_rail ? 2 * n_in : n_in) + n_fb;
  endfunction

  function automatic int row_ctrl();
    return 0;
  endfunction

  function automatic int row_clr0();
    return 1;
  endfunction

  // CLR of counter j (0-based), i.e. CLR(j+1).
  function automatic int row_clr(int j);
    return 2 + j;
  endfunction

  // P of gate g (0-based), i.e. P(g+1); ~P(g+1) is the next row.
  function automatic int row_p(int k, int g);
    return 2 + k + 2 * g;
  endfunction

  function automatic int row_pn(int k, int g);
    return 3 + k + 2 * g;
  endfunction

  // Sig of feedback flip-flop f (0-based).
  function automatic int row_sig(int k, int f);
    return 2 + 5 * k + f;
  endfunction

  // First row of the select field of counter j (0-based).
  function automatic int row_sel(int k, int n_fb, int lines, int j);
    return 2 + 5 * k + n_fb + j * lines;
  endfunction

  // Rows a complete control word needs.
  function automatic int rows_needed(int k, int n_fb, int lines);
    return 2 + 5 * k + n_fb + k * lines;
  endfunction

endpackage
