// Workload: slot scaling of the Geo/Geo/1/k queue towards M/M/1/k.
//
// Runs geo_geo_1k at its default parameters with lambda' = 0.6/n and
// mu' = 0.8/n (load 0.75), k = 10, for n = 1, 2, 4, 40 and 1000, and prints
// the measured P0 (fraction of slots starting with an empty queue) beside
// the stationary value of the same discrete-time chain, computed here, and
// the continuous-time limit (1-rho)/(1-rho^(k+1)). Each measurement must be
// within tolerance of the chain's value and P0 must fall with n.
module tb_wl_slot_scaling;
  import qnet_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic run = 1'b0;
  logic [15:0] theta_arr = '0, theta_srv = '0;
  logic [15:0] buffer_size = 16'd10;
  logic ready;
  logic [15:0] count;
  logic [47:0] slots, empty_slots, arrivals, losses, departures;
  int checks = 0, failures = 0;

  geo_geo_1k dut (.clk, .rst_n, .run, .theta_arr, .theta_srv, .buffer_size, .ready, .count,
                  .slots, .empty_slots, .arrivals, .losses, .departures);

  always #5 clk = ~clk;

  initial begin
    #400000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real chain_p0(real lam, real mu, int k);
    real pi [16];
    real nx [16];
    for (int i = 0; i <= k; i++) pi[i] = (i == 0) ? 1.0 : 0.0;
    for (int it = 0; it < 200000; it++) begin
      for (int i = 0; i <= k; i++) nx[i] = 0.0;
      for (int n = 0; n <= k; n++) begin
        // arrival first: n -> min(n+a, k) -> minus a service if not empty
        int up;
        up = (n + 1 > k) ? k : n + 1;
        nx[n]                   += pi[n] * (1.0 - lam) * (1.0 - mu);
        nx[(n > 0) ? n - 1 : 0] += pi[n] * (1.0 - lam) * mu;
        nx[up]                  += pi[n] * lam * (1.0 - mu);
        nx[up - 1]              += pi[n] * lam * mu;
      end
      for (int i = 0; i <= k; i++) pi[i] = nx[i];
    end
    return pi[0];
  endfunction

  initial begin
    int ns [5] = '{1, 2, 4, 40, 1000};
    longint len [5] = '{200000, 200000, 400000, 2000000, 30000000};
    real tol [5] = '{0.02, 0.02, 0.02, 0.03, 0.05};
    real prev = 1.0;
    real lam, mu, p0, mp0, rho, limit;
    longint s0, e0;
    rho = 0.75;
    limit = (1.0 - rho) / (1.0 - rho ** 11);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (ready);
    @(negedge clk);
    $display("   n   P0 measured   P0 chain   (M/M/1/10 limit %f)", limit);
    for (int c = 0; c < 5; c++) begin
      theta_arr = 16'(int'(0.6 / ns[c] * 65536.0 + 0.5) - 1);
      theta_srv = 16'(int'(0.8 / ns[c] * 65536.0 + 0.5) - 1);
      lam = (real'(theta_arr) + 1.0) / 65536.0;
      mu  = (real'(theta_srv) + 1.0) / 65536.0;
      p0 = chain_p0(lam, mu, 10);
      s0 = longint'(slots); e0 = longint'(empty_slots);
      run = 1'b1;
      while (longint'(slots) - s0 < len[c]) @(negedge clk);
      mp0 = real'(longint'(empty_slots) - e0) / real'(longint'(slots) - s0);
      $display("%4d   %f      %f", ns[c], mp0, p0);
      checks++;
      if (mp0 < p0 - tol[c] || mp0 > p0 + tol[c]) begin failures++; $display("P0 off for n=%0d", ns[c]); end
      checks++;
      if (mp0 >= prev) begin failures++; $display("P0 did not fall at n=%0d", ns[c]); end
      prev = mp0;
    end
    checks++;
    if (prev < limit - 0.05 || prev > limit + 0.05) begin failures++; $display("n=1000 far from the M/M/1/k limit"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
