// Memory-based random word generator.
//
// Every clock cycle it delivers a W-bit random word. The generator is a
// generalised feedback shift register built on the trinomial 1 + X + X^127:
// each of the W bit columns of the sequence obeys a[n] = a[n-127] xor
// a[n-126], so the whole word is w[n] = w[n-127] xor w[n-126]. The last 127
// words are kept in a small circular memory; each cycle the two oldest
// entries are read, their xor is the new word, and it overwrites the oldest
// entry. The polynomial and the 16-bit word come from the emulator this
// design reproduces; the memory organisation is the usual one for such a
// generator.
//
// Seeding is this design's choice: after reset the memory is filled, one word
// per cycle for LAG cycles, from a 32-bit xorshift sequence started at SEED.
// `ready` rises when the memory is full; from then on `word` is a new random
// word every cycle (it is registered, so it is valid from the cycle after the
// first advance). Different SEED values give independent streams.
module gfsr_rng #(
  parameter int unsigned W    = 16,
  parameter int unsigned LAG  = 127,
  parameter int unsigned TAP  = 1,
  parameter logic [31:0] SEED = 32'h2545_F491
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic         ready,
  output logic [W-1:0] word
);

  localparam int unsigned AW = $clog2(LAG);

  logic [W-1:0]  mem [LAG];
  logic [AW-1:0] ptr;        // oldest entry, w[n-LAG]
  logic [AW-1:0] ptr_tap;    // w[n-LAG+TAP]
  logic [31:0]   seed_q;
  logic [31:0]   seed_next;
  logic [W-1:0]  new_word;

  function automatic logic [AW-1:0] wrap_add(input logic [AW-1:0] a, input int unsigned b);
    int unsigned s;
    s = int'(a) + b;
    if (s >= LAG) s = s - LAG;
    return AW'(s);
  endfunction

  always_comb begin
    seed_next = seed_q ^ (seed_q << 13);
    seed_next = seed_next ^ (seed_next >> 17);
    seed_next = seed_next ^ (seed_next << 5);
  end

  assign ptr_tap  = wrap_add(ptr, TAP);
  assign new_word = mem[ptr] ^ mem[ptr_tap];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ptr    <= '0;
      ready  <= 1'b0;
      seed_q <= (SEED == 32'd0) ? 32'h1 : SEED;
      word   <= '0;
    end else if (!ready) begin
      // seeding pass: one word per cycle
      mem[ptr] <= seed_next[W-1:0];
      seed_q   <= seed_next;
      ptr      <= wrap_add(ptr, 1);
      if (int'(ptr) == LAG - 1) ready <= 1'b1;
    end else begin
      mem[ptr] <= new_word;
      word     <= new_word;
      ptr      <= wrap_add(ptr, 1);
    end
  end

endmodule
