// diode_or: programmable diode OR gate built from self-rectifying memristors.
//
// Each input drives one memristor whose other end sits on a common word line.
// An LRS memristor with a high input is forward biased and pulls the line high;
// one with a low input is reverse biased and, thanks to the intrinsic diode of
// the device, blocks the sneak current. The word line is therefore the OR of the
// connected inputs, with no practical limit on fan-in. A memristor in HRS takes
// its input out of the gate. CELL_LRS gives the resistance state of each
// memristor (1 = LRS); the fabric keeps all of them in LRS and selects inputs
// through its drivers instead. Purely combinational; the precharge pull-down
// and RC delays are not modelled.
module diode_or #(
  parameter int unsigned N = 12,
  parameter logic [N-1:0] CELL_LRS = '1
) (
  input  logic [N-1:0] in,
  output logic         out
);
  assign out = |(in & CELL_LRS);
endmodule
