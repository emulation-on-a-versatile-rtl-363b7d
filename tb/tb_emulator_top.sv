// End-to-end testbench of emulator_top at its default parameters.
//
// Geo/Geo/1/k half: lambda 0.6, mu 0.8 (load 0.75), k = 10, then an
// overloaded queue; checks conservation and that the queue was seen empty,
// full and losing. Switch half, at load 0.8 (theta = 52429):
//   * K1 = K2 = 10, then K1 = 10, K2 = 50: the whole-switch loss rate must
//     lie in the range of the published curves (about 3e-4 and 8e-5); both
//     stages must lose cells in the first setting;
//   * a periodic tagged flow with period 4 in the background traffic: the
//     inter-arrival histogram must spread around 4 slots and no tagged cell
//     may be lost;
//   * after every run the sources stop, the switch drains and the counters
//     must balance (emitted = lost1 + lost2 + delivered).
// Each mechanism is counted; one that never happened is a failure.
module tb_emulator_top;
  import qnet_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic g_run = 1'b0;
  logic [15:0] g_theta_arr = '0, g_theta_srv = '0, g_buffer_size = 16'd10;
  logic g_ready;
  logic [15:0] g_count;
  logic [47:0] g_slots, g_empty_slots, g_arrivals, g_losses, g_departures;
  logic s_run = 1'b0, s_src_en = 1'b0, s_periodic_en = 1'b0;
  logic [15:0] s_theta = '0;
  logic [1:0] s_periodic_dst = 2'd3;
  logic [4:0] s_cap1 = 5'd10;
  logic [5:0] s_cap2 = 6'd10;
  logic s_ready;
  logic [47:0] s_slots, s_emitted, s_lost1, s_lost2, s_delivered, s_probe_emitted, s_probe_delivered, s_iat_samples;
  logic [47:0] s_iat_hist [9];
  logic [4:0] s_occ1 [4];
  logic [5:0] s_occ2 [4];
  int checks = 0, failures = 0;

  // mechanisms
  int n_stage1_loss = 0, n_stage2_loss = 0, n_drain = 0, n_periodic = 0, n_perturbed = 0;
  int n_g_loss = 0, n_g_empty = 0, n_g_full = 0, n_frozen = 0;

  emulator_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #400000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (g_run && g_ready && g_count == 16'd0) n_g_empty++;
    if (g_run && g_ready && g_count == g_buffer_size) n_g_full++;
  end

  task automatic s_restart();
    s_run = 1'b0; s_src_en = 1'b0;
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (s_ready && g_ready);
    @(negedge clk);
  endtask

  task automatic s_slots_run(input int n, input logic en);
    logic [47:0] s0;
    s_src_en = en; s_run = 1'b1;
    s0 = s_slots;
    while (s_slots < s0 + 48'(n)) @(negedge clk);
  endtask

  task automatic s_drain(input string what);
    int occ = 0;
    s_slots_run(200, 1'b0);
    for (int q = 0; q < 4; q++) occ += int'(s_occ1[q]) + int'(s_occ2[q]);
    checks++;
    if (occ != 0 || s_emitted != s_lost1 + s_lost2 + s_delivered) begin
      failures++; $display("%s: unbalanced after drain (queued %0d)", what, occ);
    end else n_drain++;
  endtask

  task automatic loss_point(input int k1, input int k2, input int n, input real lo, input real hi);
    real rate;
    s_cap1 = 5'(k1); s_cap2 = 6'(k2); s_theta = 16'd52429; s_periodic_en = 1'b0;
    s_restart();
    s_slots_run(n, 1'b1);
    s_drain("loss run");
    rate = real'(s_lost1 + s_lost2) / real'(s_emitted);
    $display("K1=%0d K2=%0d: %0d cells, lost %0d + %0d, loss rate %e", k1, k2, s_emitted, s_lost1, s_lost2, rate);
    if (s_lost1 != 0) n_stage1_loss++;
    if (s_lost2 != 0) n_stage2_loss++;
    checks++;
    if (rate < lo || rate > hi) begin failures++; $display("loss rate outside [%e, %e]", lo, hi); end
  endtask

  initial begin
    int other;
    logic [47:0] frozen;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (s_ready && g_ready);
    @(negedge clk);

    // Geo/Geo/1/k: load 0.75, then overload
    g_theta_arr = 16'd39321; g_theta_srv = 16'd52428; g_buffer_size = 16'd10; g_run = 1'b1;
    repeat (50000) @(negedge clk);
    g_theta_arr = 16'd58981; g_theta_srv = 16'd45874; g_buffer_size = 16'd6;
    repeat (20000) @(negedge clk);
    g_run = 1'b0;
    frozen = g_slots;
    repeat (10) @(negedge clk);
    if (g_slots == frozen) n_frozen++;
    checks++;
    if (g_arrivals != g_departures + g_losses + 48'(g_count)) begin failures++; $display("Geo/Geo/1/k unbalanced"); end
    if (g_losses != 0) n_g_loss++;
    $display("Geo/Geo/1/k: slots %0d empty %0d arrivals %0d losses %0d", g_slots, g_empty_slots, g_arrivals, g_losses);

    // switch: two points of the loss curves (K1 = 10)
    loss_point(10, 10, 600000, 2.0e-4, 8.0e-4);
    loss_point(10, 50, 600000, 4.0e-5, 1.6e-4);

    // switch: periodic flow in background traffic
    s_cap1 = 5'd20; s_cap2 = 6'd30; s_theta = 16'd52429; s_periodic_en = 1'b1; s_periodic_dst = 2'd3;
    s_restart();
    s_slots_run(8000, 1'b1);
    s_drain("periodic run");
    if (s_probe_emitted == 2000) n_periodic++;
    other = 0;
    for (int b = 0; b < 9; b++) if (b != 4) other += int'(s_iat_hist[b]);
    if (other != 0) n_perturbed++;
    $display("inter-arrival histogram (slots 0..8+):");
    for (int b = 0; b < 9; b++) $display("  %0d: %f", b, real'(s_iat_hist[b]) / real'(s_iat_samples));
    checks++;
    if (s_probe_delivered != s_probe_emitted) begin failures++; $display("tagged cells lost"); end

    $display("mechanisms: stage1-loss %0d stage2-loss %0d drain %0d periodic %0d perturbed %0d g-loss %0d g-empty %0d g-full %0d frozen %0d",
             n_stage1_loss, n_stage2_loss, n_drain, n_periodic, n_perturbed, n_g_loss, n_g_empty, n_g_full, n_frozen);
    checks += 9;
    if (n_stage1_loss == 0) failures++;
    if (n_stage2_loss == 0) failures++;
    if (n_drain == 0) failures++;
    if (n_periodic == 0) failures++;
    if (n_perturbed == 0) failures++;
    if (n_g_loss == 0) failures++;
    if (n_g_empty == 0) failures++;
    if (n_g_full == 0) failures++;
    if (n_frozen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
