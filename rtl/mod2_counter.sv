// mod2_counter: modulo-two counter used as a sequential XOR gate.
//
// A D flip-flop with D = ~Q, clocked by the output of a diode OR gate, toggles
// once for every XOR term that evaluates to 1, so after m cycles it holds the
// XOR of the m terms. CLR clears it to 0 so that it can compute the next
// output. In this synchronous model the diode-OR pulse becomes the toggle
// request `t`, sampled on the rising clock edge that ends the cycle; CLR is
// synchronous and wins over a toggle. `q_nx` is the value the counter takes at
// that edge; the output array and the feedback flip-flops use it so that a
// result can be stored in the same cycle in which its last term is counted,
// as the adder and multiplier schedules require. There is no reset: the first
// control word of a program clears every counter.
module mod2_counter (
  input  logic clk,
  input  logic clr,   // CLR: clear to 0 at the next edge
  input  logic t,     // toggle request from the diode OR
  output logic q,
  output logic qn,
  output logic q_nx   // state after the coming edge
);
  assign q_nx = clr ? 1'b0 : (q ^ t);

  always_ff @(posedge clk) q <= q_nx;

  assign qn = ~q;
endmodule
