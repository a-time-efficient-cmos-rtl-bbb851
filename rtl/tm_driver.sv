// tm_driver: drivers of the target memristors (TM) of the output array.
//
// A CMOS shifter with one output per target memristor. Its outputs are 0 V
// except, while Ctrl is asserted, the one pointing at the next free target,
// which is driven to -0.6 V (here: 1) so that a volistor NOT write lands there.
// Each Ctrl advances the pointer, so successive results fill o1, o2, ... in
// order. CLR0 returns the pointer to o1; the document routes Ctrl and CLR0 to
// these drivers, and using CLR0 as the pointer reset is this design's reading.
// All updates on the rising clock edge; CLR0 wins over Ctrl.
module tm_driver #(
  parameter int unsigned NTM = 6
) (
  input  logic           clk,
  input  logic           clr0,
  input  logic           ctrl,
  output logic [NTM-1:0] o      // 1 = target driven to the write bias
);
  logic [NTM-1:0] ptr;

  always_ff @(posedge clk) begin
    if (clr0)      ptr <= NTM'(1);
    else if (ctrl) ptr <= ptr << 1;
  end

  assign o = ctrl ? ptr : '0;
endmodule
