// hybrid_driver: CMOS-memristive driver bank in front of one diode OR gate.
//
// For every input line there is a 3-input programmable diode AND gate followed
// by a CMOS buffer. The AND combines the control bit read from the ReRAM for
// this cycle, the input line (a primary input, its complement, or a feedback
// literal) and the clock phase, so a line reaches the diode OR only in a cycle
// whose control word selects it. In this synchronous model the clock input of
// the AND gates is the `en` signal, high in every cycle in which the memory
// drivers read a ReRAM column. Purely combinational.
module hybrid_driver #(
  parameter int unsigned L = 6
) (
  input  logic [L-1:0] ctrl,   // control bits C_j from the ReRAM
  input  logic [L-1:0] line,   // input lines
  input  logic         en,     // clock phase: a column is being read
  output logic [L-1:0] drive   // outputs o_j towards the diode OR
);
  for (genvar j = 0; j < L; j++) begin : g_and
    diode_and #(.N(3)) u_and (
      .in ({ctrl[j], line[j], en}),
      .out(drive[j])
    );
  end
endmodule
