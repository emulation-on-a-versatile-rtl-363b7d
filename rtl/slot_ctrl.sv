// Slot sequencer.
//
// An emulated slot (the time to serve one cell) spans SLOT_CYCLES clock
// cycles when a queue must store several arriving cells in the same slot,
// one per cycle. This block counts the cycle within the slot (`phase`, 0 to
// SLOT_CYCLES-1), marks the last one with `slot_end`, and counts completed
// slots. Everything that changes once per slot does so on the clock edge at
// which slot_end is high. While `run` is low the phase holds and slot_end
// stays low, so the emulated network is frozen.
module slot_ctrl #(
  parameter int unsigned SLOT_CYCLES = 3,
  parameter int unsigned CNT_W       = 48,
  localparam int unsigned PH_W       = (SLOT_CYCLES > 1) ? $clog2(SLOT_CYCLES) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    run,
  output logic [PH_W-1:0]         phase,
  output logic                    slot_end,
  output logic [CNT_W-1:0]        slots
);

  assign slot_end = run && (int'(phase) == SLOT_CYCLES - 1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase <= '0;
      slots <= '0;
    end else if (run) begin
      if (slot_end) begin
        phase <= '0;
        slots <= slots + 1'b1;
      end else begin
        phase <= phase + 1'b1;
      end
    end
  end

endmodule
