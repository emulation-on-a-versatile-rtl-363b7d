// Testbench for geo_source.
// Checks, slot by slot, that a cell is emitted exactly when the generator's
// word at slot_end is <= theta, that source and destination fields are
// right, that the emission rate matches (theta+1)/2^16 for three loads, that
// destinations are about uniform, and that nothing is emitted when disabled.
module tb_geo_source;
  import qnet_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic slot_end = 1'b0;
  logic enable = 1'b0;
  logic [15:0] theta = '0;
  logic ready;
  cell_t cell_out;
  int checks = 0, failures = 0;

  geo_source #(.SRC_ID(2'd3), .SEED(32'hDEAD_BEEF)) dut (.clk, .rst_n, .slot_end, .enable, .theta, .ready, .cell_out);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_load(input logic [15:0] th, input int slots, input logic en);
    int emitted = 0;
    int dsts [4] = '{0, 0, 0, 0};
    logic [15:0] w, pw;
    real rate, expect_rate;
    theta = th; enable = en;
    for (int s = 0; s < slots; s++) begin
      // two idle cycles then a slot_end cycle
      @(negedge clk); slot_end = 1'b0;
      @(negedge clk);
      @(negedge clk); slot_end = 1'b1;
      w  = dut.u_rng.word;
      pw = {14'd0, dut.prev_bits};
      @(posedge clk); #1;
      checks++;
      if (cell_out.valid !== (en && (w <= th))) begin
        failures++;
        if (failures < 10) $display("slot %0d: valid=%b word=%0d theta=%0d", s, cell_out.valid, w, th);
      end
      if (cell_out.valid) begin
        emitted++;
        dsts[cell_out.dst]++;
        checks++;
        if (cell_out.src !== 2'd3 || cell_out.probe !== 1'b0 || cell_out.dst !== pw[1:0]) begin
          failures++; $display("bad cell fields %p", cell_out);
        end
      end
    end
    @(negedge clk); slot_end = 1'b0;
    rate = real'(emitted) / real'(slots);
    expect_rate = en ? (real'(th) + 1.0) / 65536.0 : 0.0;
    checks++;
    if (rate < expect_rate - 0.02 || rate > expect_rate + 0.02) begin
      failures++; $display("theta=%0d rate %f expected %f", th, rate, expect_rate);
    end
    if (en && emitted > 400) begin
      for (int d = 0; d < 4; d++) begin
        checks++;
        if (dsts[d] < emitted / 4 * 8 / 10 || dsts[d] > emitted / 4 * 12 / 10) begin
          failures++; $display("destination %0d: %0d of %0d", d, dsts[d], emitted);
        end
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (ready);
    run_load(16'd52429, 4000, 1'b1);   // rho = 0.8
    run_load(16'd16383, 4000, 1'b1);   // rho = 0.25
    run_load(16'hFFFF, 500, 1'b1);     // always
    run_load(16'hFFFF, 500, 1'b0);     // disabled
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
