// Inter-arrival time histogram of the observed (tagged) flow.
//
// Once per slot (at slot_end) it looks at `arrival`, high when a tagged cell
// leaves the switch in this slot. It counts the slots since the previous
// such cell; at each arrival after the first, the gap t (in slots) is added
// to bin min(t, NBINS-1), so the last bin collects all gaps of NBINS-1 slots
// or more. `samples` counts the gaps recorded. The 0..8-slot range (NBINS =
// 9) matches the range over which the perturbation of a period-4 flow is
// studied; the counter widths and the open last bin are this design's
// choices. `clear` empties the histogram and forgets the last arrival.
module iat_histogram #(
  parameter int unsigned NBINS = 9,
  parameter int unsigned CNT_W = 48,
  parameter int unsigned GAP_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             slot_end,
  input  logic             arrival,
  output logic [CNT_W-1:0] hist [NBINS],
  output logic [CNT_W-1:0] samples
);

  localparam int unsigned BW = (NBINS > 1) ? $clog2(NBINS) : 1;

  logic [GAP_W-1:0] gap;
  logic             seen;
  logic [BW-1:0]    bin_idx;

  assign bin_idx = (gap >= GAP_W'(NBINS - 1)) ? BW'(NBINS - 1) : BW'(gap);

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      gap     <= '0;
      seen    <= 1'b0;
      samples <= '0;
      for (int b = 0; b < NBINS; b++) hist[b] <= '0;
    end else if (slot_end) begin
      if (arrival) begin
        if (seen) begin
          hist[bin_idx] <= hist[bin_idx] + 1'b1;
          samples       <= samples + 1'b1;
        end
        seen <= 1'b1;
        gap  <= GAP_W'(1);
      end else if (gap != '1) begin
        gap <= gap + 1'b1;
      end
    end
  end

endmodule
