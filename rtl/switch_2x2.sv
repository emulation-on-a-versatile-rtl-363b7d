// Two-by-two output-buffered switch.
//
// Each of the two inputs may offer one cell per slot. A cell goes to output
// 0 or 1 according to bit ROUTE_BIT of its destination; each output has its
// own cell_queue, so both inputs can send to the same output in one slot and
// both cells are stored (one per clock cycle of the slot). The servers are
// deterministic: each output sends one cell per slot whenever its queue is
// not empty. Output cells are registered and held through the next slot.
// `loss[o]` pulses in a cycle in which a cell for output o is lost because
// its queue is full. The split into two output queues with deterministic
// servers follows the switch model being emulated; the routing on one
// destination bit is this design's way of addressing it.
module switch_2x2
  import qnet_pkg::*;
#(
  parameter int unsigned DEPTH     = 50,
  parameter order_e      ORDER     = ARRIVAL_FIRST,
  parameter int unsigned ROUTE_BIT = 0,
  localparam int unsigned CW       = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          run,
  input  logic [1:0]    phase,
  input  logic          slot_end,
  input  cell_t         in_cells  [2],
  input  logic [CW-1:0] capacity,
  output cell_t         out_cells [2],
  output logic [1:0]    loss,
  output logic [CW-1:0] occupancy [2]
);

  cell_t to_q [2][2];   // [output][input]

  always_comb begin
    for (int o = 0; o < 2; o++) begin
      for (int i = 0; i < 2; i++) begin
        to_q[o][i] = in_cells[i];
        to_q[o][i].valid = in_cells[i].valid && (in_cells[i].dst[ROUTE_BIT] == o[0]);
      end
    end
  end

  for (genvar o = 0; o < 2; o++) begin : g_out
    cell_queue #(.N_IN(2), .DEPTH(DEPTH), .ORDER(ORDER)) u_q (
      .clk      (clk),
      .rst_n    (rst_n),
      .run      (run),
      .phase    (phase),
      .slot_end (slot_end),
      .in_cells (to_q[o]),
      .capacity (capacity),
      .serve    (1'b1),
      .out_cell (out_cells[o]),
      .loss     (loss[o]),
      .occupancy(occupancy[o])
    );
  end

endmodule
