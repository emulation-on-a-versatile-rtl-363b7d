// Testbench for switch_2x2.
// Random cells on both inputs (varying load, random destinations), capacity
// 4 cells; each slot the two output cells and the per-output loss counts are
// compared with two reference FIFOs fed by destination bit 0, arrivals of
// input 0 before input 1 and one deterministic departure per slot.
module tb_switch_2x2;
  import qnet_pkg::*;
  import qnet_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic run = 1'b0;
  logic [1:0] phase = '0;
  logic slot_end = 1'b0;
  cell_t in_cells [2];
  cell_t out_cells [2];
  logic [1:0] loss;
  logic [3:0] occupancy [2];
  int checks = 0, failures = 0;

  switch_2x2 #(.DEPTH(10), .ORDER(ARRIVAL_FIRST), .ROUTE_BIT(0)) dut (
    .clk, .rst_n, .run, .phase, .slot_end, .in_cells, .capacity(4'd4), .out_cells, .loss, .occupancy);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    RefQueue m [2];
    cell_t exp_out [2];
    int exp_loss [2];
    int got_loss [2];
    int total_loss = 0, total_out = 0, both_same = 0;
    cell_t c;
    m[0] = new(4); m[1] = new(4);
    in_cells[0] = NO_CELL; in_cells[1] = NO_CELL;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int s = 0; s < 5000; s++) begin
      in_cells[0] = rand_cell((s / 500) % 2 ? 90 : 30, 2'd0);
      in_cells[1] = rand_cell((s / 500) % 2 ? 90 : 30, 2'd1);
      if (in_cells[0].valid && in_cells[1].valid && in_cells[0].dst[0] == in_cells[1].dst[0]) both_same++;
      exp_loss = '{0, 0};
      for (int i = 0; i < 2; i++) begin
        c = in_cells[i];
        if (c.valid && m[c.dst[0]].arrive(c)) exp_loss[c.dst[0]]++;
      end
      for (int o = 0; o < 2; o++) exp_out[o] = m[o].depart(1'b1);
      got_loss = '{0, 0};
      for (int p = 0; p < 3; p++) begin
        @(negedge clk);
        run = 1'b1; phase = 2'(p); slot_end = (p == 2);
        #1;
        for (int o = 0; o < 2; o++) got_loss[o] += int'(loss[o]);
      end
      @(posedge clk); #1;
      for (int o = 0; o < 2; o++) begin
        checks += 2;
        if (!same_cell(out_cells[o], exp_out[o])) begin failures++; $display("slot %0d out%0d %p expected %p", s, o, out_cells[o], exp_out[o]); end
        if (got_loss[o] != exp_loss[o]) begin failures++; $display("slot %0d loss%0d %0d expected %0d", s, o, got_loss[o], exp_loss[o]); end
        total_loss += exp_loss[o];
        total_out += int'(exp_out[o].valid);
      end
      if (failures > 20) break;
    end
    checks++;
    if (total_loss == 0 || total_out == 0 || both_same == 0) begin failures++; $display("coverage: losses %0d out %0d conflicts %0d", total_loss, total_out, both_same); end
    $display("losses=%0d delivered=%0d same-output pairs=%0d", total_loss, total_out, both_same);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
