// Discrete-time queuing-network emulator: top level.
//
// Two emulated networks side by side, sharing only the clock and reset:
//
//   * geo_geo_1k      - a single Geo/Geo/1/k queue kept as a customer count,
//                       one slot per clock cycle (g_* ports);
//   * switch_emulator - the two-stage four-by-four switch made of 2x2
//                       output-buffered switches, with cell memories, three
//                       clock cycles per slot, Bernoulli and periodic
//                       sources and loss / jitter statistics (s_* ports).
//
// All controls are plain inputs set by the user before and during a run,
// and all statistics are counters read back at any time. Each half starts
// after its random generators have filled their 127-word memories
// (g_ready, s_ready, 127 cycles after reset). Parameter defaults are the
// largest buffer sizes studied (first stage 30, second stage 50 cells); the
// capacities actually used are set at run time on s_cap1 / s_cap2.
module emulator_top
  import qnet_pkg::*;
#(
  parameter int unsigned G_CNT_W = 16,
  parameter order_e      G_ORDER = ARRIVAL_FIRST,
  parameter int unsigned DEPTH1  = 30,
  parameter int unsigned DEPTH2  = 50,
  parameter order_e      S_ORDER = ARRIVAL_FIRST,
  parameter int unsigned PERIOD  = 4,
  parameter int unsigned NBINS   = 9,
  parameter int unsigned STAT_W  = 48,
  localparam int unsigned CW1    = $clog2(DEPTH1 + 1),
  localparam int unsigned CW2    = $clog2(DEPTH2 + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  // Geo/Geo/1/k queue
  input  logic                g_run,
  input  logic [RAND_W-1:0]   g_theta_arr,
  input  logic [RAND_W-1:0]   g_theta_srv,
  input  logic [G_CNT_W-1:0]  g_buffer_size,
  output logic                g_ready,
  output logic [G_CNT_W-1:0]  g_count,
  output logic [STAT_W-1:0]   g_slots,
  output logic [STAT_W-1:0]   g_empty_slots,
  output logic [STAT_W-1:0]   g_arrivals,
  output logic [STAT_W-1:0]   g_losses,
  output logic [STAT_W-1:0]   g_departures,
  // four-by-four switch
  input  logic                s_run,
  input  logic                s_src_en,
  input  logic [RAND_W-1:0]   s_theta,
  input  logic                s_periodic_en,
  input  logic [PORT_W-1:0]   s_periodic_dst,
  input  logic [CW1-1:0]      s_cap1,
  input  logic [CW2-1:0]      s_cap2,
  output logic                s_ready,
  output logic [STAT_W-1:0]   s_slots,
  output logic [STAT_W-1:0]   s_emitted,
  output logic [STAT_W-1:0]   s_lost1,
  output logic [STAT_W-1:0]   s_lost2,
  output logic [STAT_W-1:0]   s_delivered,
  output logic [STAT_W-1:0]   s_probe_emitted,
  output logic [STAT_W-1:0]   s_probe_delivered,
  output logic [STAT_W-1:0]   s_iat_hist [NBINS],
  output logic [STAT_W-1:0]   s_iat_samples,
  output logic [CW1-1:0]      s_occ1 [4],
  output logic [CW2-1:0]      s_occ2 [4]
);

  geo_geo_1k #(.CNT_W(G_CNT_W), .STAT_W(STAT_W), .ORDER(G_ORDER)) u_geo (
    .clk        (clk),
    .rst_n      (rst_n),
    .run        (g_run),
    .theta_arr  (g_theta_arr),
    .theta_srv  (g_theta_srv),
    .buffer_size(g_buffer_size),
    .ready      (g_ready),
    .count      (g_count),
    .slots      (g_slots),
    .empty_slots(g_empty_slots),
    .arrivals   (g_arrivals),
    .losses     (g_losses),
    .departures (g_departures)
  );

  switch_emulator #(
    .DEPTH1(DEPTH1), .DEPTH2(DEPTH2), .ORDER(S_ORDER),
    .PERIOD(PERIOD), .NBINS(NBINS), .STAT_W(STAT_W)
  ) u_sw (
    .clk            (clk),
    .rst_n          (rst_n),
    .run            (s_run),
    .src_en         (s_src_en),
    .theta          (s_theta),
    .periodic_en    (s_periodic_en),
    .periodic_dst   (s_periodic_dst),
    .cap1           (s_cap1),
    .cap2           (s_cap2),
    .ready          (s_ready),
    .slots          (s_slots),
    .emitted        (s_emitted),
    .lost1          (s_lost1),
    .lost2          (s_lost2),
    .delivered      (s_delivered),
    .probe_emitted  (s_probe_emitted),
    .probe_delivered(s_probe_delivered),
    .iat_hist       (s_iat_hist),
    .iat_samples    (s_iat_samples),
    .occ1           (s_occ1),
    .occ2           (s_occ2)
  );

endmodule
