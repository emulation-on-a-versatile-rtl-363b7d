// Queue without contents: the number-of-customers register and its glue.
//
// When all customers are alike a queue is only the count of waiting
// customers. Once per enabled clock cycle (here one cycle is one slot) the
// register is updated from the number of new arrivals, the buffer size k and
// the consumption (how many customers the server can take this slot):
//
//   arrival first:   s = n + a;  lost = max(s-k, 0);  s = min(s, k);
//                    served = min(s, c);  n' = s - served
//   departure first: served = min(n, c);  s = n - served + a;
//                    lost = max(s-k, 0);  n' = min(s, k)
//
// This is the add / compare-with-buffer-size / subtract / compare-with-zero
// chain of the arrival-first and departure-first diagrams; the outputs
// `losses` and `departures` are the customers rejected and served in the
// slot being updated (combinational, valid in the cycle where `en` is high),
// `count` is the register. Widths and reset to an empty queue are this
// design's choices. buffer_size must not be zero.
module count_queue
  import qnet_pkg::*;
#(
  parameter int unsigned CNT_W = 16,
  parameter int unsigned A_W   = 1,
  parameter order_e      ORDER = ARRIVAL_FIRST
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [A_W-1:0]   arrivals,
  input  logic [A_W-1:0]   consumption,
  input  logic [CNT_W-1:0] buffer_size,
  output logic [CNT_W-1:0] count,
  output logic [A_W-1:0]   losses,
  output logic [A_W-1:0]   departures
);

  // One spare bit so that n + a cannot overflow.
  logic [CNT_W:0] sum;
  logic [CNT_W:0] kept;
  logic [CNT_W:0] served;
  logic [CNT_W:0] lost;
  logic [CNT_W:0] next_n;
  logic [CNT_W:0] k_ext;
  logic [CNT_W:0] a_ext;
  logic [CNT_W:0] c_ext;
  logic [CNT_W:0] n_ext;

  assign k_ext = {1'b0, buffer_size};
  assign n_ext = {1'b0, count};
  assign a_ext = (CNT_W + 1)'(arrivals);
  assign c_ext = (CNT_W + 1)'(consumption);

  always_comb begin
    if (ORDER == ARRIVAL_FIRST) begin
      sum    = n_ext + a_ext;
      lost   = (sum > k_ext) ? sum - k_ext : '0;
      kept   = (sum > k_ext) ? k_ext : sum;
      served = (kept > c_ext) ? c_ext : kept;
      next_n = kept - served;
    end else begin
      served = (n_ext > c_ext) ? c_ext : n_ext;
      kept   = n_ext - served;
      sum    = kept + a_ext;
      lost   = (sum > k_ext) ? sum - k_ext : '0;
      next_n = (sum > k_ext) ? k_ext : sum;
    end
  end

  // Neither can exceed the arrivals, resp. the consumption.
  assign losses     = A_W'(lost);
  assign departures = A_W'(served);

  always_ff @(posedge clk) begin
    if (!rst_n) count <= '0;
    else if (en) count <= next_n[CNT_W-1:0];
  end

endmodule
