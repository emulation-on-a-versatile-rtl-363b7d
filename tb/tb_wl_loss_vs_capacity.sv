// Workload: global loss rate of the two-stage switch against the buffer
// capacities K1 (first stage) and K2 (second stage), load 0.8 on every
// input, uniform destinations, deterministic servers.
//
// Runs switch_emulator at its default parameters (memories of 30 and 50
// cells) over the grid K1 = 10, 15, 20, 30 and K2 = 10, 15, 20, 30, 40, 50,
// SLOTS slots per point, and prints the loss rate of each stage and of the
// whole switch. Rates near 1e-7 and below need far more cells than a
// simulation can afford; such points print as upper bounds (0 losses). The
// checks are the shape of the curves: for K1 = 10 the second stage stops
// losing once K2 >= 30 (the plateau, all losses in stage 1); at K2 = 10 the
// second stage dominates for every K1 >= 15 (the curves merge); the loss
// rate never rises with K2. Every point is drained and balanced.
module tb_wl_loss_vs_capacity;
  import qnet_pkg::*;
  localparam int SLOTS = 500000;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic run = 1'b0;
  logic src_en = 1'b0;
  logic [15:0] theta = 16'd52429;
  logic [4:0] cap1;
  logic [5:0] cap2;
  logic ready;
  logic [47:0] slots, emitted, lost1, lost2, delivered, probe_emitted, probe_delivered, iat_samples;
  logic [47:0] iat_hist [9];
  logic [4:0] occ1 [4];
  logic [5:0] occ2 [4];
  int checks = 0, failures = 0;

  switch_emulator dut (
    .clk, .rst_n, .run, .src_en, .theta, .periodic_en(1'b0), .periodic_dst(2'd0), .cap1, .cap2, .ready,
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
    int k1s [4] = '{10, 15, 20, 30};
    int k2s [6] = '{10, 15, 20, 30, 40, 50};
    real rate [4][6];
    longint l1 [4][6];
    longint l2 [4][6];
    logic [47:0] s0;
    int occ;
    $display("  K1  K2     cells   lost1  lost2   loss rate");
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 6; j++) begin
        cap1 = 5'(k1s[i]); cap2 = 6'(k2s[j]);
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
        occ = 0;
        for (int q = 0; q < 4; q++) occ += int'(occ1[q]) + int'(occ2[q]);
        checks++;
        if (occ != 0 || emitted != lost1 + lost2 + delivered) begin failures++; $display("unbalanced at K1=%0d K2=%0d", k1s[i], k2s[j]); end
        l1[i][j] = longint'(lost1); l2[i][j] = longint'(lost2);
        rate[i][j] = real'(lost1 + lost2) / real'(emitted);
        $display("  %2d  %2d  %8d  %6d %6d   %e", k1s[i], k2s[j], emitted, lost1, lost2, rate[i][j]);
      end
    end
    // plateau for K1 = 10
    for (int j = 3; j < 6; j++) begin
      checks++;
      if (l2[0][j] > l1[0][j] / 20) begin failures++; $display("K1=10 K2=%0d: second stage still loses", k2s[j]); end
    end
    // merged curves at K2 = 10
    for (int i = 1; i < 4; i++) begin
      checks++;
      if (l2[i][0] < 4 * l1[i][0]) begin failures++; $display("K1=%0d K2=10: second stage does not dominate", k1s[i]); end
    end
    checks++;
    if (l1[0][5] == 0) begin failures++; $display("no first-stage loss at K1=10"); end
    // the same random stream per point: losses can only fall as K2 grows
    for (int i = 0; i < 4; i++)
      for (int j = 1; j < 6; j++) begin
        checks++;
        if (rate[i][j] > rate[i][j-1] * 1.05 + 1.0e-7) begin failures++; $display("loss rose with K2 at K1=%0d K2=%0d", k1s[i], k2s[j]); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
