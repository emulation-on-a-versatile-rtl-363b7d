// Testbench for periodic_source.
// Slots of three cycles; checks that a tagged cell to `dst` appears in
// exactly one slot out of four, at gaps of four slots, and never when
// disabled.
module tb_periodic_source;
  import qnet_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic slot_end = 1'b0;
  logic enable = 1'b1;
  logic [1:0] dst = 2'd2;
  cell_t cell_out;
  int checks = 0, failures = 0;

  periodic_source #(.PERIOD(4), .SRC_ID(2'd1)) dut (.clk, .rst_n, .slot_end, .enable, .dst, .cell_out);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last = -1;
    int count = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int s = 0; s < 200; s++) begin
      if (s == 150) enable = 1'b0;
      @(negedge clk); slot_end = 1'b0;
      @(negedge clk);
      @(negedge clk); slot_end = 1'b1;
      @(posedge clk); #1;
      checks++;
      if (cell_out.valid) begin
        count++;
        if (s >= 150) begin failures++; $display("cell while disabled, slot %0d", s); end
        if (cell_out.probe !== 1'b1 || cell_out.dst !== 2'd2 || cell_out.src !== 2'd1) begin
          failures++; $display("bad fields %p", cell_out);
        end
        if (last >= 0 && s - last != 4) begin failures++; $display("gap %0d at slot %0d", s - last, s); end
        last = s;
      end
    end
    checks++;
    if (count != 38) begin failures++; $display("%0d cells in 150 slots, expected 38", count); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
