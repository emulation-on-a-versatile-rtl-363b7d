// Geo/Geo/1/k queue emulator.
//
// The discrete-time counterpart of the M/M/1/k queue, built as a queue
// without contents: one clock cycle is one slot. An arrival geo_source emits
// a customer with probability lambda = (theta_arr+1)/2^16 per slot; a
// second geo_source gives the server a service completion with probability
// mu = (theta_srv+1)/2^16 per slot, so service times are geometric. A
// count_queue of capacity `buffer_size` (k) combines them in the ORDER
// chosen (arrival first or departure first). Shrinking the slot by a factor
// n means dividing both thresholds by n; the queue then tends to the
// continuous-time M/M/1/k queue.
//
// Counters (STAT_W bits, cleared by reset): slots run, slots that began with
// an empty queue (their ratio estimates P0), arrivals, losses and
// departures. The queue runs while `run` is high and both generators are
// seeded (`ready`). The model follows the queue this emulator reproduces;
// the statistics kept and their widths are this design's choices.
module geo_geo_1k
  import qnet_pkg::*;
#(
  parameter int unsigned CNT_W  = 16,
  parameter int unsigned STAT_W = 48,
  parameter order_e      ORDER  = ARRIVAL_FIRST,
  parameter logic [31:0] SEED_A = 32'h6A09_E667,
  parameter logic [31:0] SEED_S = 32'hBB67_AE85
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              run,
  input  logic [RAND_W-1:0] theta_arr,
  input  logic [RAND_W-1:0] theta_srv,
  input  logic [CNT_W-1:0]  buffer_size,
  output logic              ready,
  output logic [CNT_W-1:0]  count,
  output logic [STAT_W-1:0] slots,
  output logic [STAT_W-1:0] empty_slots,
  output logic [STAT_W-1:0] arrivals,
  output logic [STAT_W-1:0] losses,
  output logic [STAT_W-1:0] departures
);

  logic  rdy_a, rdy_s;
  logic  en;
  cell_t arr_cell, srv_cell;
  logic  lost, served;

  assign ready = rdy_a && rdy_s;
  assign en    = run && ready;

  // Each source decides every cycle (slot_end = en): the decision made at
  // this edge is the arrival / service of the next slot.
  geo_source #(.SRC_ID('0), .SEED(SEED_A)) u_arr (
    .clk(clk), .rst_n(rst_n), .slot_end(en), .enable(1'b1), .theta(theta_arr),
    .ready(rdy_a), .cell_out(arr_cell)
  );

  geo_source #(.SRC_ID('0), .SEED(SEED_S)) u_srv (
    .clk(clk), .rst_n(rst_n), .slot_end(en), .enable(1'b1), .theta(theta_srv),
    .ready(rdy_s), .cell_out(srv_cell)
  );

  count_queue #(.CNT_W(CNT_W), .A_W(1), .ORDER(ORDER)) u_q (
    .clk        (clk),
    .rst_n      (rst_n),
    .en         (en),
    .arrivals   (arr_cell.valid),
    .consumption(srv_cell.valid),
    .buffer_size(buffer_size),
    .count      (count),
    .losses     (lost),
    .departures (served)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      slots       <= '0;
      empty_slots <= '0;
      arrivals    <= '0;
      losses      <= '0;
      departures  <= '0;
    end else if (en) begin
      slots       <= slots + 1'b1;
      empty_slots <= empty_slots + STAT_W'(count == '0);
      arrivals    <= arrivals + STAT_W'(arr_cell.valid);
      losses      <= losses + STAT_W'(lost);
      departures  <= departures + STAT_W'(served);
    end
  end

endmodule
