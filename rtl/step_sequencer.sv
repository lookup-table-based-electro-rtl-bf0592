// step_sequencer - timing of one simulation time step.
//
// While run is high a cycle counter runs from 0 to II-1 and restarts, so a
// new time step begins every II clocks (10 clocks = 200 ns at 50 MHz in the
// original design). Each of the nine pipeline stages gets a one-cycle strobe
// in its own cycle 0..8; the thermal stage in cycle 8 completes the step, so
// the results are registered 9 clocks after the step started and `valid`
// is high for one clock after that. The assignment of stages to cycles is
// this design's; II = 10 and the 9-cycle latency are the original design's.
// Clearing run stops the sequencer after the step in progress ends.
module step_sequencer
  import ets_pkg::*;
#(
  parameter int II = 10   // initiation interval in clocks, at least 9
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        run,
  output stage_t      stage,
  output logic        step_start,
  output logic        valid,
  output logic [31:0] step_count   // completed steps
);

  localparam int LAT = 9;
  localparam int CW  = $clog2(II);

  logic [CW-1:0] cnt;
  logic          busy;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt  <= '0;
      busy <= 1'b0;
    end else if (busy) begin
      if (int'(cnt) == II - 1) begin
        cnt  <= '0;
        busy <= run;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end else if (run) begin
      busy <= 1'b1;
      cnt  <= '0;
    end
  end

  always_comb begin
    stage.ssi    = busy && cnt == CW'(0);
    stage.a_rd   = busy && cnt == CW'(1);
    stage.eq7    = busy && cnt == CW'(2);
    stage.eq8    = busy && cnt == CW'(3);
    stage.axis   = busy && cnt == CW'(4);
    stage.lut_rd = busy && cnt == CW'(5);
    stage.interp = busy && cnt == CW'(6);
    stage.ploss  = busy && cnt == CW'(7);
    stage.therm  = busy && cnt == CW'(LAT - 1);
    step_start   = stage.ssi;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      valid      <= 1'b0;
      step_count <= '0;
    end else begin
      valid <= stage.therm;
      if (stage.therm) step_count <= step_count + 1;
    end
  end

  initial assert (II >= LAT) else $error("II must be at least %0d", LAT);

endmodule
