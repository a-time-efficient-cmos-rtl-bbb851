// xor_slice: one single-output channel of the mPLD-XOR.
//
// An L-line hybrid driver bank gates the input lines with the control bits of
// the current ReRAM column, an L-input diode OR gate combines the selected lines
// into one XOR term (a sum of the selected literals), and a modulo-two counter
// accumulates the parity of the terms over successive cycles. With complemented
// literals on the lines, a term is the NAND of the true literals, so the
// channel realises NAND-, AND-, NOR-, OR- or literal terms under one XOR; the
// result is Q or ~Q depending on the number of inverted terms. One term is
// evaluated per cycle; the counter updates on the rising edge that ends the
// cycle.
module xor_slice #(
  parameter int unsigned L = 64
) (
  input  logic         clk,
  input  logic         en,     // a ReRAM column is being read
  input  logic [L-1:0] sel,    // control bits of this counter's field
  input  logic [L-1:0] line,   // input lines
  input  logic         clr,    // CLR of the counter
  output logic         k,      // diode OR output (term value of this cycle)
  output logic         q,
  output logic         qn,
  output logic         q_nx
);
  logic [L-1:0] drive;

  hybrid_driver #(.L(L)) u_drv (
    .ctrl (sel),
    .line (line),
    .en   (en),
    .drive(drive)
  );

  diode_or #(.N(L)) u_or (
    .in (drive),
    .out(k)
  );

  mod2_counter u_cnt (
    .clk (clk),
    .clr (clr),
    .t   (k),
    .q   (q),
    .qn  (qn),
    .q_nx(q_nx)
  );
endmodule
