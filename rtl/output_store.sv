// output_store: transmission gates, source memristors and target memristors
// that keep the results of the modulo-two counters.
//
// Every counter has two rails, Q and ~Q, each connected through a transmission
// gate (controlled by P / ~P from the ReRAM) to a source memristor. All source
// memristors and all target memristors share one horizontal wire. A source
// memristor passes a high rail onto the wire and blocks a low one, so the wire
// is the OR of the connected rails. A target memristor whose TM driver is at
// -0.6 V sees -1.2 V (V_CLEAR) across it when the wire is high and switches to
// HRS (0); otherwise it stays in LRS (1). This is the volistor NOT gate: the
// target stores the complement of the rail applied, so applying ~X stores X.
//
// Modelling: rail index g = 2j is Q of counter j, g = 2j+1 is ~Q. A gate
// conducts when P = 1 (n device) or ~P = 0 (p device). The rails carry the
// counter state at the end of the cycle (q_nx), and the write happens on the
// rising edge that ends the cycle. Targets must start in LRS; CLR0 sets all of
// them to LRS at the start of a run (this re-initialisation is this design's
// choice). Reading the targets is modelled as the tm_state output.
module output_store #(
  parameter int unsigned K   = 3,
  parameter int unsigned NTM = 6
) (
  input  logic           clk,
  input  logic           clr0,
  input  logic [K-1:0]   q_nx,     // counter states at the end of the cycle
  input  logic [2*K-1:0] p,        // P1..P2k
  input  logic [2*K-1:0] pn,       // ~P1..~P2k
  input  logic [NTM-1:0] tm_sel,   // TM drivers at the write bias
  output logic [NTM-1:0] tm_state  // 1 = LRS
);
  logic [2*K-1:0] rail;
  logic [2*K-1:0] tg_on;
  logic           wire_hi;

  always_comb begin
    for (int j = 0; j < int'(K); j++) begin
      rail[2*j]   = q_nx[j];
      rail[2*j+1] = ~q_nx[j];
    end
  end

  assign tg_on   = p | ~pn;
  assign wire_hi = |(rail & tg_on);

  always_ff @(posedge clk) begin
    if (clr0) tm_state <= '1;
    else if (wire_hi) tm_state <= tm_state & ~tm_sel;
  end

  // A store must drive each transmission gate fully on or fully off.
  a_tg_pairs: assert property (@(posedge clk) (|tm_sel) |-> (p == ~pn))
    else $error("output_store: P/~P pair not complementary during a store");
endmodule
