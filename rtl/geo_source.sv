// Bernoulli cell source: geometric inter-arrival times.
//
// A gfsr_rng delivers a 16-bit random word w every clock cycle. At the end of
// each slot (slot_end high) the source decides whether a cell is emitted in
// the next slot: it is when w <= theta, so a load rho is set with
// theta = rho * 2^16 - 1 (theta = 52429 gives rho = 0.8). The successive
// decisions are independent, which makes the gaps between cells geometric.
// This comparison rule is the one of the emulator this design reproduces.
//
// The destination of the cell is drawn uniformly over the four output ports
// from the two low bits of the previous cycle's word, a separate random word
// from the one used for the emission test (uniform traffic; how the address
// is drawn is this design's choice). The cell is registered at slot_end and
// held for the whole next slot. No cell is emitted while `enable` is low or
// the generator is still seeding.
module geo_source
  import qnet_pkg::*;
#(
  parameter logic [PORT_W-1:0] SRC_ID = '0,
  parameter logic [31:0]       SEED   = 32'h2545_F491
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              slot_end,
  input  logic              enable,
  input  logic [RAND_W-1:0] theta,
  output logic              ready,
  output cell_t             cell_out
);

  logic [RAND_W-1:0] word;
  logic [PORT_W-1:0] prev_bits;   // address bits of the previous word

  gfsr_rng #(.W(RAND_W), .LAG(127), .TAP(1), .SEED(SEED)) u_rng (
    .clk  (clk),
    .rst_n(rst_n),
    .ready(ready),
    .word (word)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      prev_bits <= '0;
      cell_out  <= NO_CELL;
    end else begin
      prev_bits <= word[PORT_W-1:0];
      if (slot_end) begin
        cell_out.valid  <= enable && ready && (word <= theta);
        cell_out.probe <= 1'b0;
        cell_out.src    <= SRC_ID;
        cell_out.dst    <= prev_bits;
      end
    end
  end

endmodule
