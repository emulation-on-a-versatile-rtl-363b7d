// Workload: perturbation of a period-4 tagged flow by background traffic.
//
// Runs switch_emulator at its default parameters, K1 = 20, K2 = 30, with the
// periodic source on input 0 (destination port 3) and the three other
// inputs loaded with Bernoulli traffic of load 0.2, 0.4, 0.6, 0.8 and 0.9.
// For each load it prints the distribution of the inter-arrival time of the
// tagged cells at the output (0..7 slots, last bin 8 or more). Checks: no
// tagged cell is lost, the mean gap stays 4 slots, and the share of gaps
// still equal to 4 falls as the background load rises.
module tb_wl_periodic_jitter;
  import qnet_pkg::*;
  localparam int SLOTS = 200000;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic run = 1'b0;
  logic src_en = 1'b0;
  logic [15:0] theta;
  logic ready;
  logic [47:0] slots, emitted, lost1, lost2, delivered, probe_emitted, probe_delivered, iat_samples;
  logic [47:0] iat_hist [9];
  logic [4:0] occ1 [4];
  logic [5:0] occ2 [4];
  int checks = 0, failures = 0;

  switch_emulator dut (
    .clk, .rst_n, .run, .src_en, .theta, .periodic_en(1'b1), .periodic_dst(2'd3), .cap1(5'd20), .cap2(6'd30), .ready,
    .slots, .emitted, .lost1, .lost2, .delivered, .probe_emitted, .probe_delivered,
    .iat_hist, .iat_samples, .occ1, .occ2);

  always #5 clk = ~clk;

  initial begin
    #1000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real loads [5] = '{0.2, 0.4, 0.6, 0.8, 0.9};
    real prev4 = 1.01;
    real p [9];
    real mean;
    logic [47:0] s0;
    $display(" load   P(0)  P(1)  P(2)  P(3)  P(4)  P(5)  P(6)  P(7)  P(8+)  mean");
    for (int l = 0; l < 5; l++) begin
      theta = 16'(int'(loads[l] * 65536.0 + 0.5) - 1);
      run = 1'b0; src_en = 1'b0; rst_n = 1'b0;
      repeat (3) @(negedge clk);
      rst_n = 1'b1;
      wait (ready);
      @(negedge clk);
      run = 1'b1; src_en = 1'b1;
      s0 = slots;
      while (slots < s0 + 48'(SLOTS)) @(negedge clk);
      src_en = 1'b0;
      s0 = slots;
      while (slots < s0 + 48'd200) @(negedge clk);
      mean = 0.0;
      for (int b = 0; b < 9; b++) begin
        p[b] = real'(iat_hist[b]) / real'(iat_samples);
        mean += p[b] * b;
      end
      $display(" %3.1f   %4.2f  %4.2f  %4.2f  %4.2f  %4.2f  %4.2f  %4.2f  %4.2f  %4.2f   %4.2f",
               loads[l], p[0], p[1], p[2], p[3], p[4], p[5], p[6], p[7], p[8], mean);
      checks += 3;
      if (probe_delivered != probe_emitted || probe_emitted != 48'(SLOTS / 4)) begin failures++; $display("tagged cells lost"); end
      if (mean < 3.95 || mean > 4.05) begin failures++; $display("mean gap %f", mean); end
      if (p[4] >= prev4) begin failures++; $display("P(4) did not fall at load %f", loads[l]); end
      prev4 = p[4];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
