// Testbench for gfsr_rng.
// Rebuilds the seed words with its own xorshift32 and the word sequence with
// the recurrence w[n] = w[n-127] xor w[n-126], then compares every output
// word over 3000 cycles. Also checks that `ready` rises 127 cycles after
// reset and that each bit column is close to balanced.
module tb_gfsr_rng;
  localparam int N = 3000;
  localparam logic [31:0] SEED = 32'h1234_5678;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic ready;
  logic [15:0] word;
  int checks = 0, failures = 0;

  gfsr_rng #(.W(16), .LAG(127), .TAP(1), .SEED(SEED)) dut (.clk, .rst_n, .ready, .word);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] seq [127 + N + 2];
  int ones [16];

  initial begin
    logic [31:0] x;
    int cyc;
    x = SEED;
    for (int i = 0; i < 127; i++) begin
      x = x ^ (x << 13); x = x ^ (x >> 17); x = x ^ (x << 5);
      seq[i] = x[15:0];
    end
    for (int n = 127; n < 127 + N + 2; n++) seq[n] = seq[n-127] ^ seq[n-126];
    foreach (ones[b]) ones[b] = 0;

    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    cyc = 0;
    @(posedge clk);
    do begin @(negedge clk); cyc++; end while (!ready);
    checks++;
    if (cyc != 127) begin failures++; $display("ready after %0d cycles, expected 127", cyc); end
    for (int k = 0; k < N; k++) begin
      @(negedge clk);
      checks++;
      if (word !== seq[127 + k]) begin
        failures++;
        if (failures < 10) $display("word %0d: got %h expected %h", k, word, seq[127 + k]);
      end
      for (int b = 0; b < 16; b++) ones[b] += int'(word[b]);
    end
    for (int b = 0; b < 16; b++) begin
      checks++;
      if (ones[b] < N * 45 / 100 || ones[b] > N * 55 / 100) begin
        failures++; $display("bit %0d ones=%0d of %0d", b, ones[b], N);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
