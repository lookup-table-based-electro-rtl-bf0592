// tb_thermal_model - loads [F G] of the reference Cauer network into power
// module 1 (module 0 gets different data), then applies 3000 updates with
// pulsed MOSFET and diode losses and compares all seven node temperatures
// with a double-precision backward-Euler simulation; both junctions must
// have heated up by the end.
module tb_thermal_model;
  import ets_pkg::*;
  import ets_tb_pkg::*;

  logic    clk = 0, rst = 1, en = 0;
  cfg_wr_t wr;
  fx_t     p_s, p_d, t_amb;
  fx_t     t [7];
  fx_t     tj_s, tj_d;
  int checks = 0, failures = 0;

  thermal_model #(.PM(1'b1)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(cfgq_t q);
    foreach (q[k]) begin
      wr = q[k];
      @(negedge clk);
    end
    wr = '0;
  endtask

  initial begin
    cfgq_t q;
    m10_t fg;
    real tr [7], tn [7], u [3];
    wr = '0;
    t_amb = to_fx(TAMB);
    p_s = '0; p_d = '0;
    q = cfg_th(1'b0);
    foreach (q[k]) q[k].data = q[k].data + 40'd12345;
    load(q);
    load(cfg_th(1'b1));
    @(negedge clk);
    rst = 0;
    fg = build_fg();
    for (int k = 0; k < 7; k++) tr[k] = TAMB;
    checks++;
    if (rabs(fx2r(tj_s) - TAMB) > 1e-6) failures++;
    for (int n = 0; n < 3000; n++) begin
      u[0] = ((n / 50) % 2 == 0) ? 12000.0 : 60.0;   // switching-like bursts
      u[1] = ((n / 70) % 2 == 0) ? 0.0 : 90.0;
      u[2] = TAMB;
      p_s = to_fx(u[0]); p_d = to_fx(u[1]);
      en = 1; @(negedge clk); en = 0;
      for (int r = 0; r < 7; r++) begin
        tn[r] = 0.0;
        for (int c = 0; c < 7; c++) tn[r] += fg[r][c] * tr[c];
        for (int c = 0; c < 3; c++) tn[r] += fg[r][7 + c] * u[c];
      end
      tr = tn;
      if (n % 100 == 99) begin
        for (int r = 0; r < 7; r++) begin
          checks++;
          if (rabs(fx2r(t[r]) - tr[r]) > 1e-4) begin
            failures++;
            if (failures < 8) $display("step %0d node %0d got %f exp %f", n, r + 1, fx2r(t[r]), tr[r]);
          end
        end
      end
    end
    checks++;
    if (fx2r(tj_s) <= TAMB + 1e-3 || fx2r(tj_d) <= TAMB + 1e-4) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
