// Testbench for switch_4x4.
// Random uniform traffic on the four inputs at varying load, first-stage
// capacity 3 and second-stage capacity 2 so that both stages lose cells.
// A slot-level reference of the eight queues and the crossover predicts the
// four output cells and the losses of each stage every slot; the minimum
// input-to-output latency (two slots) is checked on an otherwise empty
// switch at the start.
module tb_switch_4x4;
  import qnet_pkg::*;
  import qnet_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic run = 1'b0;
  logic [1:0] phase = '0;
  logic slot_end = 1'b0;
  cell_t in_cells [4];
  cell_t out_cells [4];
  logic [3:0] loss1, loss2;
  logic [2:0] occ1 [4];
  logic [2:0] occ2 [4];
  int checks = 0, failures = 0;

  switch_4x4 #(.DEPTH1(6), .DEPTH2(6), .ORDER(ARRIVAL_FIRST)) dut (
    .clk, .rst_n, .run, .phase, .slot_end, .in_cells, .cap1(3'd3), .cap2(3'd2),
    .out_cells, .loss1, .loss2, .occ1, .occ2);

  always #5 clk = ~clk;

  initial begin
    #4000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    RefQueue q1 [2][2];   // [switch][output]
    RefQueue q2 [2][2];
    cell_t s1_out [2][2];
    cell_t s1_out_n [2][2];
    cell_t s2_out [2][2];
    cell_t c;
    int e1, e2, g1, g2;
    int tot1 = 0, tot2 = 0, delivered = 0, first_out = -1;
    for (int s = 0; s < 2; s++) for (int o = 0; o < 2; o++) begin
      q1[s][o] = new(3); q2[s][o] = new(2); s1_out[s][o] = NO_CELL; s2_out[s][o] = NO_CELL;
    end
    foreach (in_cells[i]) in_cells[i] = NO_CELL;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int s = 0; s < 6000; s++) begin
      // slot 0: a single cell to port 3, to measure the latency
      for (int i = 0; i < 4; i++) in_cells[i] = (s < 10) ? NO_CELL : rand_cell((s / 600) % 2 ? 85 : 35, 2'(i));
      if (s == 0) begin in_cells[2].valid = 1'b1; in_cells[2].dst = 2'd3; end
      e1 = 0; e2 = 0;
      // stage 1: switch s1 takes inputs 2*sw, 2*sw+1, routes on dst[1]
      for (int sw = 0; sw < 2; sw++)
        for (int i = 0; i < 2; i++) begin
          c = in_cells[2*sw + i];
          if (c.valid && q1[sw][c.dst[1]].arrive(c)) e1++;
        end
      // stage 2: switch t takes stage-1 output t of switch i, routes on dst[0]
      for (int t = 0; t < 2; t++)
        for (int i = 0; i < 2; i++) begin
          c = s1_out[i][t];
          if (c.valid && q2[t][c.dst[0]].arrive(c)) e2++;
        end
      for (int sw = 0; sw < 2; sw++) for (int o = 0; o < 2; o++) begin
        s1_out_n[sw][o] = q1[sw][o].depart(1'b1);
        s2_out[sw][o] = q2[sw][o].depart(1'b1);
      end
      s1_out = s1_out_n;
      g1 = 0; g2 = 0;
      for (int p = 0; p < 3; p++) begin
        @(negedge clk);
        run = 1'b1; phase = 2'(p); slot_end = (p == 2);
        #1;
        g1 += $countones(loss1);
        g2 += $countones(loss2);
      end
      @(posedge clk); #1;
      for (int port = 0; port < 4; port++) begin
        checks++;
        if (!same_cell(out_cells[port], s2_out[port / 2][port % 2])) begin
          failures++; $display("slot %0d port %0d out %p expected %p", s, port, out_cells[port], s2_out[port / 2][port % 2]);
        end
        if (out_cells[port].valid) begin
          delivered++;
          checks++;
          if (int'(out_cells[port].dst) != port) begin failures++; $display("cell for %0d left on port %0d", out_cells[port].dst, port); end
          if (first_out < 0) first_out = s;
        end
      end
      checks += 2;
      if (g1 != e1) begin failures++; $display("slot %0d stage-1 losses %0d expected %0d", s, g1, e1); end
      if (g2 != e2) begin failures++; $display("slot %0d stage-2 losses %0d expected %0d", s, g2, e2); end
      tot1 += e1; tot2 += e2;
      if (failures > 20) break;
    end
    // the slot-0 cell leaves the switch in the output register written at the end of slot 1
    checks++;
    if (first_out != 1) begin failures++; $display("first cell out after slot %0d, expected 1", first_out); end
    checks++;
    if (tot1 == 0 || tot2 == 0) begin failures++; $display("coverage: stage-1 losses %0d stage-2 losses %0d", tot1, tot2); end
    $display("stage-1 losses=%0d stage-2 losses=%0d delivered=%0d", tot1, tot2, delivered);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
