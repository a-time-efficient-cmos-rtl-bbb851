// diode_and: programmable diode AND gate built from self-rectifying memristors.
//
// Each input drives one memristor whose other end sits on a common word line
// pulled up through a resistor. A memristor in the low-resistance state (LRS)
// conducts when its input is low and pulls the word line down, so the line is
// the AND of the connected inputs. A memristor left in the high-resistance
// state (HRS) behaves as an open switch and takes its input out of the gate;
// this is what makes the gate programmable. CELL_LRS gives the resistance state
// of each memristor (1 = LRS); in the fabric all of them are in LRS, as the
// gates require. Purely combinational. The electrical behaviour (pull-up
// resistor, charge delay) is not modelled; a gate with no connected input reads
// as high through its pull-up.
module diode_and #(
  parameter int unsigned N = 3,
  parameter logic [N-1:0] CELL_LRS = '1
) (
  input  logic [N-1:0] in,
  output logic         out
);
  assign out = &(in | ~CELL_LRS);
endmodule
