// feedback_reg: feedback D flip-flops of the mPLD-XOR with feedback.
//
// Flip-flop f samples the result of counter f when its clock signal Sig(f+1),
// read from the ReRAM, is asserted, and feeds it back to every hybrid driver
// bank as an extra input line. This turns the two-level XOR structure into a
// multilevel network: an internal XOR result can be a literal of a later term,
// and the counter is free for another output. The flip-flop stores the counter
// state Q as it is at the end of the cycle (d is the counter's next state), and
// the line carries that value unchanged: a result computed with an odd number
// of inverted terms appears on its line complemented, ready to be ANDed as a
// true literal. Which counter feeds which flip-flop, and this polarity, are
// this design's choices. Sig acts as a clock enable on the fabric clock. No
// reset: a program captures a value before it uses the line.
module feedback_reg #(
  parameter int unsigned NFB = 3
) (
  input  logic           clk,
  input  logic [NFB-1:0] sig,   // Sig1..Sig_NFB
  input  logic [NFB-1:0] d,     // counter states at the end of the cycle
  output logic [NFB-1:0] q      // feedback lines
);
  always_ff @(posedge clk) begin
    for (int f = 0; f < NFB; f++) begin
      if (sig[f]) q[f] <= d[f];
    end
  end
endmodule
