// Testbench for iat_histogram.
// Feeds a random arrival pattern, one decision per slot, with gaps from 1 to
// 14 slots, computes the expected histogram (gaps of 8 or more in the last
// bin) and compares all bins and the sample count; then checks `clear`.
module tb_iat_histogram;
  localparam int NBINS = 9;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clear = 1'b0;
  logic slot_end = 1'b0;
  logic arrival = 1'b0;
  logic [31:0] hist [NBINS];
  logic [31:0] samples;
  int checks = 0, failures = 0;

  iat_histogram #(.NBINS(NBINS), .CNT_W(32), .GAP_W(8)) dut (.clk, .rst_n, .clear, .slot_end, .arrival, .hist, .samples);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_hist [NBINS];
    int exp_samples = 0;
    int last = -1;
    int next_arr;
    foreach (exp_hist[b]) exp_hist[b] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    next_arr = 3;
    for (int s = 0; s < 4000; s++) begin
      @(negedge clk);
      arrival = (s == next_arr);
      slot_end = 1'b1;
      if (arrival) begin
        if (last >= 0) begin
          exp_hist[(s - last) >= NBINS - 1 ? NBINS - 1 : s - last]++;
          exp_samples++;
        end
        last = s;
        next_arr = s + ($urandom_range(0, 3) == 0 ? $urandom_range(1, 14) : $urandom_range(2, 6));
      end
      @(negedge clk);
      slot_end = 1'b0;   // a cycle with slot_end low must not count
      arrival = 1'b1;
    end
    @(negedge clk);
    arrival = 1'b0;
    for (int b = 0; b < NBINS; b++) begin
      checks++;
      if (int'(hist[b]) != exp_hist[b]) begin failures++; $display("bin %0d: %0d expected %0d", b, hist[b], exp_hist[b]); end
    end
    checks++;
    if (int'(samples) != exp_samples) begin failures++; $display("samples %0d expected %0d", samples, exp_samples); end
    checks++;
    if (exp_hist[NBINS-1] == 0 || exp_hist[1] == 0) begin failures++; $display("coverage: open bin or gap 1 never hit"); end
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    checks++;
    if (samples != 0 || hist[4] != 0) begin failures++; $display("clear did not empty the histogram"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
