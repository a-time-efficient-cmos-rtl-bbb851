// reram: crossbar ReRAM holding the control program of the fabric.
//
// ROWS x COLS self-rectifying memristors; a cell in LRS stores 1, in HRS 0.
// Column c holds the control word of clock cycle c+1. To read, the memory
// drivers raise one column line; every row senses the selected cell through
// its reference resistor, and the diode behaviour of the cells keeps sneak
// currents out of the unselected columns. The read is therefore combinational:
// rd_data is the OR of the words of all raised columns (exactly one in normal
// operation). The array is non-volatile and has no reset.
//
// Programming (applying V_SET / V_CLEAR to the cells) is done once, before the
// fabric runs; here it is a synchronous write of one whole column per clock
// through prog_we / prog_col / prog_data. The write circuitry itself, the
// reference resistors and the sense levels are not modelled.
module reram #(
  parameter int unsigned ROWS = 64,
  parameter int unsigned COLS = 16,
  localparam int unsigned CW  = (COLS > 1) ? $clog2(COLS) : 1
) (
  input  logic            clk,
  input  logic [COLS-1:0] col_sel,    // one-hot column drive from the memory drivers
  output logic [ROWS-1:0] rd_data,    // sensed rows
  input  logic            prog_we,    // program one column
  input  logic [CW-1:0]   prog_col,
  input  logic [ROWS-1:0] prog_data
);
  logic [ROWS-1:0] cells [COLS];

  always_ff @(posedge clk) begin
    if (prog_we) cells[prog_col] <= prog_data;
  end

  always_comb begin
    rd_data = '0;
    for (int c = 0; c < COLS; c++) begin
      if (col_sel[c]) rd_data |= cells[c];
    end
  end
endmodule
