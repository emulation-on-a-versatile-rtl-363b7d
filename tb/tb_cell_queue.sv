// Testbench for cell_queue.
// An arrival-first and a departure-first queue (memory of 8 cells) receive
// random cells on both inputs, with a random server and a capacity that
// changes from time to time. Each clock cycle the loss pulse, and each slot
// the departing cell, are compared with a slot-level reference FIFO that
// applies the same order of events.
module tb_cell_queue;
  import qnet_pkg::*;
  import qnet_ref_pkg::*;
  localparam int DEPTH = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic run = 1'b0;
  logic [1:0] phase = '0;
  logic slot_end = 1'b0;
  cell_t in_cells [2];
  logic [3:0] capacity = 4'd5;
  logic serve = 1'b0;
  cell_t out_af, out_df;
  logic loss_af, loss_df;
  logic [3:0] occ_af, occ_df;
  int checks = 0, failures = 0;

  cell_queue #(.N_IN(2), .DEPTH(DEPTH), .ORDER(ARRIVAL_FIRST)) dut_af (
    .clk, .rst_n, .run, .phase, .slot_end, .in_cells, .capacity, .serve,
    .out_cell(out_af), .loss(loss_af), .occupancy(occ_af));
  cell_queue #(.N_IN(2), .DEPTH(DEPTH), .ORDER(DEPARTURE_FIRST)) dut_df (
    .clk, .rst_n, .run, .phase, .slot_end, .in_cells, .capacity, .serve,
    .out_cell(out_df), .loss(loss_df), .occupancy(occ_df));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    RefQueue m_af, m_df;
    cell_t dep_af, dep_df;
    bit l;
    int losses = 0, deps = 0, fulls = 0;
    m_af = new(5);
    m_df = new(5);
    in_cells[0] = NO_CELL; in_cells[1] = NO_CELL;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int s = 0; s < 6000; s++) begin
      if (s % 300 == 0) begin
        capacity = 4'($urandom_range(1, DEPTH));
        m_af.cap = int'(capacity); m_df.cap = int'(capacity);
      end
      in_cells[0] = rand_cell((s / 1000) % 2 ? 80 : 40, 2'd0);
      in_cells[1] = rand_cell((s / 1000) % 2 ? 80 : 40, 2'd1);
      serve = ($urandom_range(0, 99) < 70);
      dep_af = NO_CELL; dep_df = NO_CELL;
      for (int p = 0; p < 3; p++) begin
        @(negedge clk);
        phase = 2'(p);
        run = 1'b1;
        slot_end = (p == 2);
        #1;
        // arrival first: arrivals at phases 0,1, departure at phase 2
        if (p < 2) begin
          l = m_af.arrive(in_cells[p]);
          checks++;
          if (loss_af !== l) begin failures++; $display("AF slot %0d phase %0d loss %b expected %b", s, p, loss_af, l); end
          if (l) losses++;
        end else dep_af = m_af.depart(serve);
        // departure first: departure at phase 0, arrivals at phases 1,2
        if (p == 0) dep_df = m_df.depart(serve);
        else begin
          l = m_df.arrive(in_cells[p-1]);
          checks++;
          if (loss_df !== l) begin failures++; $display("DF slot %0d phase %0d loss %b expected %b", s, p, loss_df, l); end
        end
        if (m_af.q.size() == m_af.cap) fulls++;
      end
      @(negedge clk);
      slot_end = 1'b0;
      run = 1'b0;   // the queue must hold still between slots
      checks += 2;
      if (!same_cell(out_af, dep_af)) begin failures++; $display("AF slot %0d out %p expected %p", s, out_af, dep_af); end
      if (!same_cell(out_df, dep_df)) begin failures++; $display("DF slot %0d out %p expected %p", s, out_df, dep_df); end
      checks += 2;
      if (int'(occ_af) != m_af.q.size() || int'(occ_df) != m_df.q.size()) begin
        failures++; $display("slot %0d occupancy %0d/%0d %0d/%0d", s, occ_af, m_af.q.size(), occ_df, m_df.q.size());
      end
      if (dep_af.valid) deps++;
      if (failures > 20) break;
    end
    checks++;
    if (losses == 0 || deps == 0 || fulls == 0) begin failures++; $display("coverage: losses %0d departures %0d full %0d", losses, deps, fulls); end
    $display("losses=%0d departures=%0d", losses, deps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
