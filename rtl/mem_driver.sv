// mem_driver: CMOS memory drivers of the control ReRAM, an m-bit shifter.
//
// The outputs (Q1..Qm) are (1,0,..,0) in the first clock cycle of a run,
// (0,1,0,..,0) in the second and (0,..,0,1) in the m-th, so the ReRAM columns
// are read one after another, one per cycle. After the m-th cycle all outputs
// are 0 and the fabric idles until the next run. A run starts in the first
// cycle after `rst` is released (synchronous, active high); while `rst` is high
// no column is driven. `busy` is high in every cycle in which a column is read.
module mem_driver #(
  parameter int unsigned COLS = 16
) (
  input  logic            clk,
  input  logic            rst,
  output logic [COLS-1:0] col_sel,
  output logic            busy
);
  logic            first;   // next cycle is the first of a run
  logic [COLS-1:0] sh;      // shifter state from the second cycle on

  always_ff @(posedge clk) begin
    if (rst) begin
      first <= 1'b1;
      sh    <= '0;
    end else begin
      first <= 1'b0;
      sh    <= col_sel << 1;
    end
  end

  assign col_sel = rst ? '0 : (first ? COLS'(1) : sh);
  assign busy    = |col_sel;
endmodule
