// tb_step_sequencer - runs the sequencer for 50 steps and checks that a
// step starts every 10 clocks, that each of the nine stage strobes fires
// exactly once per step in its own cycle 0..8, that valid follows 9 clocks
// after the step start, that the step counter counts, and that clearing
// run lets the step in progress finish and then stops.
module tb_step_sequencer;
  import ets_pkg::*;

  logic clk = 0, rst = 1, run = 0;
  stage_t stage;
  logic step_start, valid;
  logic [31:0] step_count;
  int checks = 0, failures = 0;

  step_sequencer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0, last_start = -1, starts = 0;

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    run = 1;
    repeat (500) begin
      @(negedge clk);
      cyc++;
      if (step_start) begin
        if (last_start >= 0) begin
          checks++;
          if (cyc - last_start != 10) failures++;
        end
        last_start = cyc;
        starts++;
      end
      if (last_start >= 0) begin
        logic [8:0] exp_s;
        int k;
        k = cyc - last_start;
        exp_s = (k < 9) ? 9'(1 << (8 - k)) : 9'd0;
        checks++;
        if (stage != exp_s) begin
          failures++;
          if (failures < 5) $display("cycle %0d of step: stage %b", k, stage);
        end
        checks++;
        if (valid != (k == 9)) failures++;
      end
    end
    checks++;
    if (starts != 50) failures++;
    checks++;
    if (step_count < 49 || step_count > 50) failures++;
    run = 0;
    repeat (15) @(negedge clk);
    checks++;
    if (stage != '0 || step_count != 32'(starts)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
