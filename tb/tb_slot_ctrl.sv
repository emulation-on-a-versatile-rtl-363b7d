// Testbench for slot_ctrl.
// Checks the phase sequence 0,1,2,0,..., that slot_end marks exactly phase
// 2, that slots count up once per slot and that everything holds while run
// is low.
module tb_slot_ctrl;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic run = 1'b0;
  logic [1:0] phase;
  logic slot_end;
  logic [47:0] slots;
  int checks = 0, failures = 0;

  slot_ctrl #(.SLOT_CYCLES(3), .CNT_W(48)) dut (.clk, .rst_n, .run, .phase, .slot_end, .slots);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_phase = 0;
    int exp_slots = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int c = 0; c < 600; c++) begin
      @(negedge clk);
      run = ($urandom_range(0, 3) != 0);
      #1;
      checks++;
      if (int'(phase) != exp_phase || int'(slots) != exp_slots || slot_end !== (run && exp_phase == 2)) begin
        failures++;
        if (failures < 10) $display("cycle %0d: phase=%0d/%0d slots=%0d/%0d slot_end=%b", c, phase, exp_phase, slots, exp_slots, slot_end);
      end
      if (run) begin
        if (exp_phase == 2) begin exp_phase = 0; exp_slots++; end
        else exp_phase++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
