// Emulation of the two-stage four-by-four switch under uniform traffic.
//
// Four sources feed switch_4x4 once per slot. Each is a geo_source (load
// theta: a cell with probability (theta+1)/2^16 per slot, uniformly
// addressed). With `periodic_en` set, source 0 is replaced by a
// periodic_source that sends one tagged cell every PERIOD slots to port
// `periodic_dst`, while sources 1-3 keep generating the background traffic.
// A slot_ctrl splits each slot into three clock cycles (two arrivals and one
// departure per queue); emulation starts once every random generator is
// seeded and `run` is high. `src_en` low stops all sources, which lets the
// network drain.
//
// Statistics, all STAT_W-bit counters cleared by reset: slots, cells
// emitted, cells lost in stage 1 and in stage 2, cells delivered, tagged
// cells emitted and delivered, and the histogram of inter-arrival times of
// tagged cells at the outputs (iat_histogram). The loss rate over the whole
// switch is (lost1 + lost2) / emitted. Which statistics are kept and how
// they are counted is this design's choice, made to measure the loss rate
// and the perturbation of the periodic flow.
module switch_emulator
  import qnet_pkg::*;
#(
  parameter int unsigned DEPTH1 = 30,
  parameter int unsigned DEPTH2 = 50,
  parameter order_e      ORDER  = ARRIVAL_FIRST,
  parameter int unsigned PERIOD = 4,
  parameter int unsigned NBINS  = 9,
  parameter int unsigned STAT_W = 48,
  localparam int unsigned CW1   = $clog2(DEPTH1 + 1),
  localparam int unsigned CW2   = $clog2(DEPTH2 + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              run,
  input  logic              src_en,
  input  logic [RAND_W-1:0] theta,
  input  logic              periodic_en,
  input  logic [PORT_W-1:0] periodic_dst,
  input  logic [CW1-1:0]    cap1,
  input  logic [CW2-1:0]    cap2,
  output logic              ready,
  output logic [STAT_W-1:0] slots,
  output logic [STAT_W-1:0] emitted,
  output logic [STAT_W-1:0] lost1,
  output logic [STAT_W-1:0] lost2,
  output logic [STAT_W-1:0] delivered,
  output logic [STAT_W-1:0] probe_emitted,
  output logic [STAT_W-1:0] probe_delivered,
  output logic [STAT_W-1:0] iat_hist [NBINS],
  output logic [STAT_W-1:0] iat_samples,
  output logic [CW1-1:0]    occ1 [4],
  output logic [CW2-1:0]    occ2 [4]
);

  // Per-source seeds: arbitrary distinct non-zero constants.
  localparam logic [31:0] SEEDS [4] = '{32'h2545_F491, 32'h9E37_79B9, 32'h7F4A_7C15, 32'hC2B2_AE35};

  logic [3:0]  src_ready;
  logic        running;
  logic [1:0]  phase;
  logic        slot_end;
  cell_t       geo_cells [4];
  cell_t       per_cell;
  cell_t       in_cells  [4];
  cell_t       out_cells [4];
  logic [3:0]  loss1;
  logic [3:0]  loss2;
  logic [2:0]  n_in;
  logic [2:0]  n_probe_in;
  logic [2:0]  n_out;
  logic [2:0]  n_probe_out;
  logic [2:0]  n_loss1;
  logic [2:0]  n_loss2;

  assign ready   = &src_ready;
  assign running = run && ready;

  slot_ctrl #(.SLOT_CYCLES(3), .CNT_W(STAT_W)) u_slot (
    .clk     (clk),
    .rst_n   (rst_n),
    .run     (running),
    .phase   (phase),
    .slot_end(slot_end),
    .slots   (slots)
  );

  for (genvar s = 0; s < 4; s++) begin : g_src
    geo_source #(.SRC_ID(PORT_W'(s)), .SEED(SEEDS[s])) u_geo (
      .clk     (clk),
      .rst_n   (rst_n),
      .slot_end(slot_end),
      .enable  (src_en && !(s == 0 && periodic_en)),
      .theta   (theta),
      .ready   (src_ready[s]),
      .cell_out(geo_cells[s])
    );
  end

  periodic_source #(.PERIOD(PERIOD), .SRC_ID('0)) u_per (
    .clk     (clk),
    .rst_n   (rst_n),
    .slot_end(slot_end),
    .enable  (src_en && periodic_en),
    .dst     (periodic_dst),
    .cell_out(per_cell)
  );

  always_comb begin
    for (int s = 0; s < 4; s++) in_cells[s] = geo_cells[s];
    if (periodic_en) in_cells[0] = per_cell;
  end

  switch_4x4 #(.DEPTH1(DEPTH1), .DEPTH2(DEPTH2), .ORDER(ORDER)) u_sw (
    .clk      (clk),
    .rst_n    (rst_n),
    .run      (running),
    .phase    (phase),
    .slot_end (slot_end),
    .in_cells (in_cells),
    .cap1     (cap1),
    .cap2     (cap2),
    .out_cells(out_cells),
    .loss1    (loss1),
    .loss2    (loss2),
    .occ1     (occ1),
    .occ2     (occ2)
  );

  always_comb begin
    n_in = '0; n_probe_in = '0; n_out = '0; n_probe_out = '0; n_loss1 = '0; n_loss2 = '0;
    for (int p = 0; p < 4; p++) begin
      n_in        += 3'(in_cells[p].valid);
      n_probe_in  += 3'(in_cells[p].valid && in_cells[p].probe);
      n_out       += 3'(out_cells[p].valid);
      n_probe_out += 3'(out_cells[p].valid && out_cells[p].probe);
      n_loss1     += 3'(loss1[p]);
      n_loss2     += 3'(loss2[p]);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      emitted         <= '0;
      lost1           <= '0;
      lost2           <= '0;
      delivered       <= '0;
      probe_emitted   <= '0;
      probe_delivered <= '0;
    end else begin
      // cells on the inputs / outputs are held for a whole slot: count once
      if (slot_end) begin
        emitted         <= emitted + STAT_W'(n_in);
        probe_emitted   <= probe_emitted + STAT_W'(n_probe_in);
        delivered       <= delivered + STAT_W'(n_out);
        probe_delivered <= probe_delivered + STAT_W'(n_probe_out);
      end
      lost1 <= lost1 + STAT_W'(n_loss1);
      lost2 <= lost2 + STAT_W'(n_loss2);
    end
  end

  iat_histogram #(.NBINS(NBINS), .CNT_W(STAT_W), .GAP_W(16)) u_hist (
    .clk     (clk),
    .rst_n   (rst_n),
    .clear   (1'b0),
    .slot_end(slot_end),
    .arrival (n_probe_out != '0),
    .hist    (iat_hist),
    .samples (iat_samples)
  );

endmodule
