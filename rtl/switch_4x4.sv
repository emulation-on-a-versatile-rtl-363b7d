// Four-by-four double-stage switch built from two-by-two output-buffered
// switches.
//
// Stage 1 has two 2x2 switches: s1a serves inputs 0 and 1, s1b inputs 2 and
// 3. Both route on destination bit 1, i.e. on which second-stage switch the
// cell must reach. The links then cross: output 0 of each first-stage switch
// feeds s2a (its input 0 from s1a, input 1 from s1b), output 1 feeds s2b.
// Stage 2 routes on destination bit 0, so output port p = {s2 index, queue}
// equals the destination p. First-stage queues have capacity `cap1`
// (memory DEPTH1), second-stage queues `cap2` (memory DEPTH2).
//
// Timing: a cell offered at an input during slot t is queued in stage 1 in
// slot t; it can leave stage 1 at the end of slot t at the earliest, is
// queued in stage 2 during slot t+1 and leaves on out_cells during slot t+2.
// loss1[q] / loss2[q] pulse when a cell is lost at a full queue: stage-1
// queue q = 2*switch + output, stage-2 queue q = output port. The topology
// and the two capacities K1 and K2 are those of the emulated switch; the
// choice of destination bits for routing is this design's.
module switch_4x4
  import qnet_pkg::*;
#(
  parameter int unsigned DEPTH1 = 30,
  parameter int unsigned DEPTH2 = 50,
  parameter order_e      ORDER  = ARRIVAL_FIRST,
  localparam int unsigned CW1   = $clog2(DEPTH1 + 1),
  localparam int unsigned CW2   = $clog2(DEPTH2 + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           run,
  input  logic [1:0]     phase,
  input  logic           slot_end,
  input  cell_t          in_cells  [N_PORTS],
  input  logic [CW1-1:0] cap1,
  input  logic [CW2-1:0] cap2,
  output cell_t          out_cells [N_PORTS],
  output logic [3:0]     loss1,
  output logic [3:0]     loss2,
  output logic [CW1-1:0] occ1 [4],
  output logic [CW2-1:0] occ2 [4]
);

  cell_t s1_in  [2][2];   // [switch][input]
  cell_t s1_out [2][2];   // [switch][output]
  cell_t s2_in  [2][2];
  cell_t s2_out [2][2];

  always_comb begin
    for (int s = 0; s < 2; s++) begin
      for (int i = 0; i < 2; i++) begin
        s1_in[s][i] = in_cells[2*s + i];
        // crossover: stage-1 output s feeds stage-2 switch s on input i
        s2_in[s][i] = s1_out[i][s];
        out_cells[2*s + i] = s2_out[s][i];
      end
    end
  end

  for (genvar s = 0; s < 2; s++) begin : g_stage
    switch_2x2 #(.DEPTH(DEPTH1), .ORDER(ORDER), .ROUTE_BIT(1)) u_s1 (
      .clk      (clk),
      .rst_n    (rst_n),
      .run      (run),
      .phase    (phase),
      .slot_end (slot_end),
      .in_cells (s1_in[s]),
      .capacity (cap1),
      .out_cells(s1_out[s]),
      .loss     (loss1[2*s +: 2]),
      .occupancy(occ1[2*s +: 2])
    );
    switch_2x2 #(.DEPTH(DEPTH2), .ORDER(ORDER), .ROUTE_BIT(0)) u_s2 (
      .clk      (clk),
      .rst_n    (rst_n),
      .run      (run),
      .phase    (phase),
      .slot_end (slot_end),
      .in_cells (s2_in[s]),
      .capacity (cap2),
      .out_cells(s2_out[s]),
      .loss     (loss2[2*s +: 2]),
      .occupancy(occ2[2*s +: 2])
    );
  end

endmodule
