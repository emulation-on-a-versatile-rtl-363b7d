// Periodic probe cell source: the observed point-to-point flow.
//
// Every PERIOD slots it emits one cell, probe so that it can be told apart
// from the background traffic at the switch output, and addressed to the
// fixed destination `dst`. A slot counter runs from 0 to PERIOD-1, advancing
// at slot_end; a cell is emitted for the slot that follows the counter's
// value 0. The period of 4 slots is the one of the studied flow; the phase
// of the first cell (the first slot after reset) is this design's choice.
// The cell is registered at slot_end and held for the whole next slot.
module periodic_source
  import qnet_pkg::*;
#(
  parameter int unsigned       PERIOD = 4,
  parameter logic [PORT_W-1:0] SRC_ID = '0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              slot_end,
  input  logic              enable,
  input  logic [PORT_W-1:0] dst,
  output cell_t             cell_out
);

  localparam int unsigned CW = (PERIOD > 1) ? $clog2(PERIOD) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt  <= '0;
      cell_out <= NO_CELL;
    end else if (slot_end) begin
      cnt         <= (int'(cnt) == PERIOD - 1) ? '0 : cnt + 1'b1;
      cell_out.valid  <= enable && (cnt == '0);
      cell_out.probe <= 1'b1;
      cell_out.src    <= SRC_ID;
      cell_out.dst    <= dst;
    end
  end

endmodule
