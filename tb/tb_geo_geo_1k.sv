// Testbench for geo_geo_1k.
// Runs the Geo/Geo/1/k queue for three settings (including both service
// orders), checks conservation of customers every cycle (arrivals =
// departures + losses + queued), that the queue never exceeds k, and that
// the measured empty-slot fraction P0 and loss fraction agree with the
// stationary distribution of the same discrete-time chain, computed here by
// power iteration.
module tb_geo_geo_1k;
  import qnet_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic run = 1'b0;
  logic [15:0] theta_arr, theta_srv;
  logic [15:0] buffer_size;
  logic ready_af, ready_df;
  logic [15:0] count_af, count_df;
  logic [47:0] slots_af, empty_af, arr_af, loss_af, dep_af;
  logic [47:0] slots_df, empty_df, arr_df, loss_df, dep_df;
  int checks = 0, failures = 0;

  geo_geo_1k #(.CNT_W(16), .STAT_W(48), .ORDER(ARRIVAL_FIRST)) dut_af (
    .clk, .rst_n, .run, .theta_arr, .theta_srv, .buffer_size, .ready(ready_af), .count(count_af),
    .slots(slots_af), .empty_slots(empty_af), .arrivals(arr_af), .losses(loss_af), .departures(dep_af));
  geo_geo_1k #(.CNT_W(16), .STAT_W(48), .ORDER(DEPARTURE_FIRST), .SEED_A(32'h3C6E_F372), .SEED_S(32'hA54F_F53A)) dut_df (
    .clk, .rst_n, .run, .theta_arr, .theta_srv, .buffer_size, .ready(ready_df), .count(count_df),
    .slots(slots_df), .empty_slots(empty_df), .arrivals(arr_df), .losses(loss_df), .departures(dep_df));

  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Stationary distribution of the slot-start count; returns P0 and the
  // loss probability per arrival.
  task automatic model(input real lam, input real mu, input int k, input bit df, output real p0, output real ploss);
    real pi [64];
    real nx [64];
    real lost;
    for (int i = 0; i <= k; i++) pi[i] = (i == 0) ? 1.0 : 0.0;
    for (int it = 0; it < 20000; it++) begin
      for (int i = 0; i <= k; i++) nx[i] = 0.0;
      lost = 0.0;
      for (int n = 0; n <= k; n++)
        for (int a = 0; a < 2; a++)
          for (int c = 0; c < 2; c++) begin
            real pr;
            int s;
            pr = pi[n] * (a ? lam : 1.0 - lam) * (c ? mu : 1.0 - mu);
            if (!df) begin
              s = n + a;
              if (s > k) begin s = k; lost += pr; end
              if (c && s > 0) s--;
            end else begin
              s = n;
              if (c && s > 0) s--;
              s = s + a;
              if (s > k) begin s = k; lost += pr; end
            end
            nx[s] += pr;
          end
      for (int i = 0; i <= k; i++) pi[i] = nx[i];
    end
    p0 = pi[0];
    ploss = lost / lam;
  endtask

  task automatic run_case(input logic [15:0] ta, input logic [15:0] ts, input int k, input int cycles);
    real lam, mu, p0_af, p0_df, pl_af, pl_df, m_p0, m_pl;
    longint s0_af, e0_af, a0_af, l0_af, s0_df, e0_df, a0_df, l0_df;
    int maxq = 0;
    theta_arr = ta; theta_srv = ts; buffer_size = 16'(k);
    @(negedge clk);
    s0_af = longint'(slots_af); e0_af = longint'(empty_af); a0_af = longint'(arr_af); l0_af = longint'(loss_af);
    s0_df = longint'(slots_df); e0_df = longint'(empty_df); a0_df = longint'(arr_df); l0_df = longint'(loss_df);
    for (int c = 0; c < cycles; c++) begin
      @(negedge clk);
      checks++;
      if (arr_af != dep_af + loss_af + 48'(count_af) || arr_df != dep_df + loss_df + 48'(count_df)) begin
        failures++;
        if (failures < 10) $display("conservation broken at cycle %0d", c);
      end
      checks++;
      if (int'(count_af) > k || int'(count_df) > k) begin failures++; $display("queue above k"); end
      if (int'(count_af) > maxq) maxq = int'(count_af);
    end
    lam = (real'(ta) + 1.0) / 65536.0;
    mu  = (real'(ts) + 1.0) / 65536.0;
    model(lam, mu, k, 1'b0, p0_af, pl_af);
    model(lam, mu, k, 1'b1, p0_df, pl_df);
    m_p0 = real'(longint'(empty_af) - e0_af) / real'(longint'(slots_af) - s0_af);
    m_pl = real'(longint'(loss_af) - l0_af) / real'(longint'(arr_af) - a0_af);
    $display("AF lambda=%f mu=%f k=%0d: P0 %f (model %f)  loss %f (model %f)", lam, mu, k, m_p0, p0_af, m_pl, pl_af);
    checks += 2;
    if (m_p0 < p0_af - 0.02 || m_p0 > p0_af + 0.02) begin failures++; $display("AF P0 off"); end
    if (m_pl < pl_af - 0.02 || m_pl > pl_af + 0.02) begin failures++; $display("AF loss off"); end
    m_p0 = real'(longint'(empty_df) - e0_df) / real'(longint'(slots_df) - s0_df);
    m_pl = real'(longint'(loss_df) - l0_df) / real'(longint'(arr_df) - a0_df);
    $display("DF lambda=%f mu=%f k=%0d: P0 %f (model %f)  loss %f (model %f)", lam, mu, k, m_p0, p0_df, m_pl, pl_df);
    checks += 2;
    if (m_p0 < p0_df - 0.02 || m_p0 > p0_df + 0.02) begin failures++; $display("DF P0 off"); end
    if (m_pl < pl_df - 0.02 || m_pl > pl_df + 0.02) begin failures++; $display("DF loss off"); end
    checks++;
    if (pl_af > 1.0e-3 && maxq != k) begin failures++; $display("queue never reached k=%0d", k); end
  endtask

  initial begin
    theta_arr = '0; theta_srv = '0; buffer_size = 16'd5;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (ready_af && ready_df);
    @(negedge clk);
    run = 1'b1;
    run_case(16'd19660, 16'd32767, 5, 100000);    // lambda 0.3, mu 0.5, k 5
    run_case(16'd39321, 16'd52428, 10, 100000);   // lambda 0.6, mu 0.8 (rho 0.75), k 10
    run_case(16'd52428, 16'd45874, 4, 100000);    // overload: lambda 0.8, mu 0.7
    // frozen while run is low
    run = 1'b0;
    begin
      logic [47:0] s_before;
      s_before = slots_af;
      repeat (20) @(negedge clk);
      checks++;
      if (slots_af != s_before) begin failures++; $display("slots advanced while stopped"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
