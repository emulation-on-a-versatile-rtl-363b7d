// Testbench for switch_emulator.
// Three runs, each from reset:
//  1. load 0.8 on all four inputs, small buffers (K1 = 3, K2 = 2): both
//     stages lose cells; after the sources stop and the switch drains,
//     emitted = lost1 + lost2 + delivered and every queue is empty; the
//     measured load is close to 0.8.
//  2. the periodic source alone (background at the lowest load): one tagged
//     cell every 4 slots, nearly all inter-arrival gaps equal 4.
//  3. the periodic source with background at load 0.8 and large buffers
//     (K1 = 20, K2 = 30): gaps other than 4 appear, no tagged cell is lost.
module tb_switch_emulator;
  import qnet_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic run = 1'b0;
  logic src_en = 1'b0;
  logic [15:0] theta = '0;
  logic periodic_en = 1'b0;
  logic [1:0] periodic_dst = 2'd2;
  logic [4:0] cap1 = 5'd3;
  logic [5:0] cap2 = 6'd2;
  logic ready;
  logic [47:0] slots, emitted, lost1, lost2, delivered, probe_emitted, probe_delivered, iat_samples;
  logic [47:0] iat_hist [9];
  logic [4:0] occ1 [4];
  logic [5:0] occ2 [4];
  int checks = 0, failures = 0;

  switch_emulator dut (
    .clk, .rst_n, .run, .src_en, .theta, .periodic_en, .periodic_dst, .cap1, .cap2, .ready,
    .slots, .emitted, .lost1, .lost2, .delivered, .probe_emitted, .probe_delivered,
    .iat_hist, .iat_samples, .occ1, .occ2);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic restart();
    run = 1'b0; src_en = 1'b0;
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (ready);
    @(negedge clk);
  endtask

  task automatic run_slots(input int n, input logic en);
    logic [47:0] s0;
    src_en = en; run = 1'b1;
    s0 = slots;
    while (slots < s0 + 48'(n)) @(negedge clk);
  endtask

  task automatic check_drained(input string what);
    int occ = 0;
    for (int q = 0; q < 4; q++) occ += int'(occ1[q]) + int'(occ2[q]);
    checks += 2;
    if (occ != 0) begin failures++; $display("%s: %0d cells still queued", what, occ); end
    if (emitted != lost1 + lost2 + delivered) begin
      failures++; $display("%s: emitted %0d != lost1 %0d + lost2 %0d + delivered %0d", what, emitted, lost1, lost2, delivered);
    end
  endtask

  initial begin
    real load;
    int other;
    // run 1: losses in both stages
    theta = 16'd52429; cap1 = 5'd3; cap2 = 6'd2; periodic_en = 1'b0;
    restart();
    run_slots(3000, 1'b1);
    load = real'(emitted) / (4.0 * real'(slots));
    run_slots(100, 1'b0);
    check_drained("run 1");
    $display("run 1: slots %0d emitted %0d lost1 %0d lost2 %0d delivered %0d load %f", slots, emitted, lost1, lost2, delivered, load);
    checks += 3;
    if (lost1 == 0) begin failures++; $display("no stage-1 loss"); end
    if (lost2 == 0) begin failures++; $display("no stage-2 loss"); end
    if (load < 0.77 || load > 0.83) begin failures++; $display("offered load %f", load); end

    // run 2: periodic flow alone
    theta = 16'd0; cap1 = 5'd20; cap2 = 6'd30; periodic_en = 1'b1; periodic_dst = 2'd2;
    restart();
    run_slots(2000, 1'b1);
    run_slots(20, 1'b0);
    check_drained("run 2");
    $display("run 2: probe emitted %0d delivered %0d samples %0d gap4 %0d", probe_emitted, probe_delivered, iat_samples, iat_hist[4]);
    checks += 3;
    if (probe_emitted != 500) begin failures++; $display("expected 500 tagged cells in 2000 slots"); end
    if (probe_delivered != probe_emitted) begin failures++; $display("tagged cells lost"); end
    if (iat_hist[4] + 2 < iat_samples || iat_samples != probe_delivered - 1) begin failures++; $display("periodic flow perturbed without background"); end

    // run 3: periodic flow with background at load 0.8
    theta = 16'd52429; periodic_en = 1'b1; periodic_dst = 2'd1;
    restart();
    run_slots(4000, 1'b1);
    run_slots(100, 1'b0);
    check_drained("run 3");
    other = 0;
    for (int b = 0; b < 9; b++) if (b != 4) other += int'(iat_hist[b]);
    $display("run 3: hist %0d %0d %0d %0d %0d %0d %0d %0d %0d", iat_hist[0], iat_hist[1], iat_hist[2], iat_hist[3], iat_hist[4], iat_hist[5], iat_hist[6], iat_hist[7], iat_hist[8]);
    checks += 3;
    if (other == 0) begin failures++; $display("no perturbation of the periodic flow"); end
    if (probe_delivered != probe_emitted || probe_emitted != 1000) begin failures++; $display("tagged %0d emitted %0d delivered", probe_emitted, probe_delivered); end
    if (iat_hist[0] != 0) begin failures++; $display("gap of 0 slots"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
