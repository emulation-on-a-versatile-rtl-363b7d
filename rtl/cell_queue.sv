// Queue with contents: a finite-capacity FIFO of cells kept in a memory.
//
// When customers carry information (source, destination, tag) each queue is
// a memory as deep as its capacity. Several cells may arrive in one slot, so
// a slot is spread over SLOT_CYCLES = N_IN + 1 clock cycles: one cycle per
// possible arrival, in which the memory takes at most one write, and one
// cycle for the departure. The `phase` input (from slot_ctrl) says which
// cycle of the slot it is:
//
//   ARRIVAL_FIRST:   phases 0..N_IN-1 store in_cells[0..N_IN-1], phase N_IN
//                    serves the head cell (a cell may leave in the slot it
//                    arrived in)
//   DEPARTURE_FIRST: phase 0 serves the head cell, phases 1..N_IN store the
//                    arrivals (the freed place is usable in the same slot)
//
// An arriving cell finding `capacity` cells already queued is lost: `loss`
// pulses for that cycle. The server is taken from `serve` (tied high for a
// deterministic server): when it is high and the queue is not empty, the head
// cell is removed. The departing cell appears on `out_cell` at the slot_end
// edge and is held through the whole following slot, which is when the next
// queue stores it; `out_cell.valid` is low for a slot with no departure.
// `capacity` (1..DEPTH) can be changed between runs so that one build covers
// a range of buffer sizes; DEPTH is the memory size.
//
// The memory organisation, the one-cycle-per-arrival schedule, the
// lower-index-input-first order of storage and the one-slot transfer to the
// next stage are this design's choices.
module cell_queue
  import qnet_pkg::*;
#(
  parameter int unsigned N_IN  = 2,
  parameter int unsigned DEPTH = 50,
  parameter order_e      ORDER = ARRIVAL_FIRST,
  localparam int unsigned PH_W = $clog2(N_IN + 1),
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            run,
  input  logic [PH_W-1:0] phase,
  input  logic            slot_end,
  input  cell_t           in_cells [N_IN],
  input  logic [CW-1:0]   capacity,
  input  logic            serve,
  output cell_t           out_cell,
  output logic            loss,
  output logic [CW-1:0]   occupancy
);

  localparam int unsigned DEP_PHASE = (ORDER == ARRIVAL_FIRST) ? N_IN : 0;
  localparam int unsigned WR_BASE   = (ORDER == ARRIVAL_FIRST) ? 0 : 1;

  cell_t         mem [DEPTH];
  logic [AW-1:0] wr_ptr;
  logic [AW-1:0] rd_ptr;
  logic [CW-1:0] count;
  cell_t         arriving;
  logic          is_wr_phase;
  logic          do_write;
  logic          do_read;
  cell_t         hold;

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (int'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_comb begin
    is_wr_phase = 1'b0;
    arriving    = NO_CELL;
    for (int i = 0; i < N_IN; i++) begin
      if (int'(phase) == WR_BASE + i) begin
        is_wr_phase = 1'b1;
        arriving    = in_cells[i];
      end
    end
  end

  assign do_write  = run && is_wr_phase && arriving.valid && (count < capacity);
  assign loss      = run && is_wr_phase && arriving.valid && (count >= capacity);
  assign do_read   = run && (int'(phase) == DEP_PHASE) && serve && (count != '0);
  assign occupancy = count;

  always_ff @(posedge clk) begin
    if (do_write) mem[wr_ptr] <= arriving;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      count    <= '0;
      hold     <= NO_CELL;
      out_cell <= NO_CELL;
    end else begin
      if (do_write) wr_ptr <= next_ptr(wr_ptr);
      if (do_read)  rd_ptr <= next_ptr(rd_ptr);
      // only one of the two can happen in a cycle
      if (do_write)     count <= count + 1'b1;
      else if (do_read) count <= count - 1'b1;

      if (ORDER == ARRIVAL_FIRST) begin
        // departure phase is the slot_end cycle
        if (slot_end) out_cell <= do_read ? mem[rd_ptr] : NO_CELL;
      end else begin
        if (run && int'(phase) == DEP_PHASE) hold <= do_read ? mem[rd_ptr] : NO_CELL;
        if (slot_end) out_cell <= hold;
      end
    end
  end

  // The queue never holds more than its memory, and the capacity fits it.
  a_count_bound : assert property (@(posedge clk) disable iff (!rst_n) count <= CW'(DEPTH));
  a_capacity    : assert property (@(posedge clk) disable iff (!rst_n) run |-> (capacity <= CW'(DEPTH)));

endmodule
