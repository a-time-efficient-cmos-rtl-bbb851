// mpld_xor: CMOS-memristive programmable logic device with modulo-two counters
// (mPLD-XOR), optionally with feedback flip-flops.
//
// The fabric evaluates multi-output functions written as XORs of terms, where a
// term is any NAND, AND, NOR, OR or single literal of the primary inputs. One
// term per counter is evaluated in every clock cycle:
//   * the memory drivers (a one-hot shifter) read one ReRAM column per cycle;
//     the column is the control word of that cycle (row map in mpld_pkg);
//   * per counter, a hybrid driver bank passes the selected input lines to an
//     L-input diode OR gate, whose output toggles that counter's modulo-two
//     counter; after m terms the counter holds their XOR;
//   * control rows clear counters (CLR1..CLRk), select which counter rail is
//     stored (P / ~P) and trigger the store (Ctrl); the result is written into
//     the next target memristor by a volistor NOT, as its complement of the
//     applied rail, so applying ~X stores X;
//   * with N_FB > 0, feedback flip-flops (clock enables Sig) keep counter results
//     and offer them to every counter as extra input lines, which makes
//     multilevel XOR networks possible.
// Input lines per counter: with DUAL_RAIL = 0 only the complements ~In_i (the
// simplified fabric of the adder and multiplier examples), with DUAL_RAIL = 1
// In_1, ~In_1, In_2, ~In_2, ...; then the N_FB feedback lines.
//
// Timing: pulse rst (synchronous) after loading the ReRAM through the prog_*
// port; column c+1 is read in the (c+1)-th cycle after rst is released and its
// effects are visible after that cycle's rising edge. Primary inputs must be
// stable during a run. tm_state holds the stored results (1 = LRS), in store
// order. Defaults: 6 inputs, 3 counters, 3 feedback flip-flops, 6 targets, and a
// 64 x 16 ReRAM, as in the 3-bit adder / multiplier examples. The synchronous
// single-clock timing, the programming port and the row placement of the Sig
// bits are this design's choices.
module mpld_xor
  import mpld_pkg::*;
#(
  parameter int unsigned N_IN      = 6,
  parameter int unsigned K         = 3,
  parameter int unsigned N_FB      = 3,
  parameter bit          DUAL_RAIL = 1'b0,
  parameter int unsigned N_TM      = 6,
  parameter int unsigned ROWS      = 64,
  parameter int unsigned COLS      = 16,
  localparam int unsigned CW       = (COLS > 1) ? $clog2(COLS) : 1
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [N_IN-1:0] in,          // primary inputs
  input  logic            prog_we,     // ReRAM programming port
  input  logic [CW-1:0]   prog_col,
  input  logic [ROWS-1:0] prog_data,
  output logic [N_TM-1:0] tm_state,    // target memristor states
  output logic [K-1:0]    cnt_q,       // counter states Q
  output logic [K-1:0]    cnt_qn,      // counter outputs ~Q
  output logic [K-1:0]    term,        // diode OR outputs of this cycle
  output logic            busy         // a program is running
);
  localparam int unsigned NIL  = DUAL_RAIL ? 2 * N_IN : N_IN;  // input lines
  localparam int unsigned L    = NIL + N_FB;                   // lines per counter
  localparam int unsigned NEED = rows_needed(K, N_FB, L);

  initial assert (NEED <= ROWS)
    else $fatal(1, "mpld_xor: ReRAM needs %0d rows, has %0d", NEED, ROWS);

  logic [COLS-1:0] col_sel;
  logic [ROWS-1:0] word;

  mem_driver #(.COLS(COLS)) u_mdrv (
    .clk    (clk),
    .rst    (rst),
    .col_sel(col_sel),
    .busy   (busy)
  );

  reram #(.ROWS(ROWS), .COLS(COLS)) u_reram (
    .clk      (clk),
    .col_sel  (col_sel),
    .rd_data  (word),
    .prog_we  (prog_we),
    .prog_col (prog_col),
    .prog_data(prog_data)
  );

  // Control rows of the current column.
  logic           ctrl, clr0;
  logic [K-1:0]   clr;
  logic [2*K-1:0] p, pn;

  always_comb begin
    ctrl = word[row_ctrl()];
    clr0 = word[row_clr0()];
    for (int j = 0; j < int'(K); j++) clr[j] = word[row_clr(j)];
    for (int g = 0; g < 2 * int'(K); g++) begin
      p[g]  = word[row_p(K, g)];
      pn[g] = word[row_pn(K, g)];
    end
  end

  // Primary-input lines (input inverters, optional true rail).
  logic [NIL-1:0] in_lines;

  always_comb begin
    for (int i = 0; i < int'(N_IN); i++) begin
      if (DUAL_RAIL) begin
        in_lines[2*i]   = in[i];
        in_lines[2*i+1] = ~in[i];
      end else begin
        in_lines[i] = ~in[i];
      end
    end
  end

  logic [K-1:0] q, q_nx;
  logic [L-1:0] lines;

  if (N_FB > 0) begin : g_fb
    logic [N_FB-1:0] sig, fb_d, fb_q;

    always_comb begin
      for (int f = 0; f < int'(N_FB); f++) begin
        sig[f]  = word[row_sig(K, f)];
        // flip-flop f takes counter f (wrapping if there are more flip-flops)
        fb_d[f] = q_nx[f % int'(K)];
      end
    end

    feedback_reg #(.NFB(N_FB)) u_fb (
      .clk(clk),
      .sig(sig),
      .d  (fb_d),
      .q  (fb_q)
    );

    assign lines = {fb_q, in_lines};
  end else begin : g_nofb
    assign lines = in_lines;
  end

  for (genvar j = 0; j < K; j++) begin : g_ch
    xor_slice #(.L(L)) u_slice (
      .clk (clk),
      .en  (busy),
      .sel (word[row_sel(K, N_FB, L, j) +: L]),
      .line(lines),
      .clr (clr[j]),
      .k   (term[j]),
      .q   (q[j]),
      .qn  (cnt_qn[j]),
      .q_nx(q_nx[j])
    );
  end

  assign cnt_q = q;

  logic [N_TM-1:0] tm_sel;

  tm_driver #(.NTM(N_TM)) u_tmd (
    .clk (clk),
    .clr0(clr0),
    .ctrl(ctrl),
    .o   (tm_sel)
  );

  output_store #(.K(K), .NTM(N_TM)) u_store (
    .clk     (clk),
    .clr0    (clr0),
    .q_nx    (q_nx),
    .p       (p),
    .pn      (pn),
    .tm_sel  (tm_sel),
    .tm_state(tm_state)
  );
endmodule
