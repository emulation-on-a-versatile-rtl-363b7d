// Testbench for count_queue.
// Two instances, arrival first and departure first, with up to 3 arrivals
// and 3 services per slot and a varying buffer size, are compared cycle by
// cycle with a reference model of each order.
module tb_count_queue;
  import qnet_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en = 1'b0;
  logic [1:0] arrivals = '0, consumption = '0;
  logic [7:0] buffer_size = 8'd5;
  logic [7:0] count_af, count_df;
  logic [1:0] loss_af, loss_df, dep_af, dep_df;
  int checks = 0, failures = 0;

  count_queue #(.CNT_W(8), .A_W(2), .ORDER(ARRIVAL_FIRST)) dut_af (
    .clk, .rst_n, .en, .arrivals, .consumption, .buffer_size, .count(count_af), .losses(loss_af), .departures(dep_af));
  count_queue #(.CNT_W(8), .A_W(2), .ORDER(DEPARTURE_FIRST)) dut_df (
    .clk, .rst_n, .en, .arrivals, .consumption, .buffer_size, .count(count_df), .losses(loss_df), .departures(dep_df));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int imin(int a, int b); return a < b ? a : b; endfunction
  function automatic int imax(int a, int b); return a > b ? a : b; endfunction

  initial begin
    int n_af = 0, n_df = 0;
    int l, d, s, k, a, c;
    int full_seen = 0, loss_seen = 0, empty_seen = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      en = ($urandom_range(0, 7) != 0);
      arrivals = 2'($urandom_range(0, 3));
      consumption = 2'($urandom_range(0, 3));
      // a new buffer size never below what is queued
      if (cyc % 500 == 0) buffer_size = 8'($urandom_range(imax(imax(n_af, n_df), 1), 12));
      #1;
      k = int'(buffer_size); a = int'(arrivals); c = int'(consumption);
      // arrival first
      s = n_af + a; l = imax(s - k, 0); s = imin(s, k); d = imin(s, c);
      checks++;
      if (int'(count_af) != n_af || int'(loss_af) != l || int'(dep_af) != d) begin
        failures++;
        if (failures < 10) $display("AF cyc %0d: n=%0d/%0d loss=%0d/%0d dep=%0d/%0d", cyc, count_af, n_af, loss_af, l, dep_af, d);
      end
      if (l > 0) loss_seen++;
      if (en) n_af = s - d;
      // departure first
      d = imin(n_df, c); s = n_df - d + a; l = imax(s - k, 0);
      checks++;
      if (int'(count_df) != n_df || int'(loss_df) != l || int'(dep_df) != d) begin
        failures++;
        if (failures < 10) $display("DF cyc %0d: n=%0d/%0d loss=%0d/%0d dep=%0d/%0d", cyc, count_df, n_df, loss_df, l, dep_df, d);
      end
      if (n_df == k) full_seen++;
      if (n_df == 0) empty_seen++;
      if (en) n_df = imin(s, k);
    end
    checks++;
    if (loss_seen == 0 || full_seen == 0 || empty_seen == 0) begin
      failures++; $display("coverage: loss %0d full %0d empty %0d", loss_seen, full_seen, empty_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
