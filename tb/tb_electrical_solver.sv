// tb_electrical_solver - loads the nine A matrices of the reference
// converter (120 V in, 400 uH, 470 uF, 10 ohm, 200 ns step) and drives the
// solver from reset for 4000 time steps with 50 kHz PWM, duty 0.6, the two
// gate signals 180 degrees apart, then 2000 steps at duty 0.3 so that the
// case with both diodes conducting also occurs. Every step is compared with a
// double-precision model that applies the same switch rules and matrices:
// the identified switch states (wherever the inductor currents are clearly
// away from zero), the state x = [iL1 iL2 vC1 vC2] and the device voltages
// and currents. The strobes come from a local 10-cycle counter.
module tb_electrical_solver;
  import ets_pkg::*;
  import ets_tb_pkg::*;

  logic       clk = 0, rst = 1;
  stage_t     stage;
  cfg_wr_t    wr;
  logic [1:0] u;
  fx_t        vin;
  fx_t        x [4];
  logic [1:0] u_q;
  sw_state_t  m1, m2;
  logic [3:0] case_idx;
  fx_t        vds [2], id [2], if_ [2];
  int checks = 0, failures = 0;
  int seen [9];

  electrical_solver dut (.*);

  always #5 clk = ~clk;

  int cnt = 0;
  logic running = 0;
  always_ff @(posedge clk) cnt <= (cnt == 9 || !running) ? 0 : cnt + 1;
  always_comb begin
    stage = '0;
    if (running) stage = stage_t'(9'(1 << (8 - cnt)) & 9'h1ff);
    if (cnt == 9) stage = '0;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void chk(string what, int n, fx_t got, real exp, real tol);
    checks++;
    if (rabs(fx2r(got) - exp) > tol) begin
      failures++;
      if (failures < 10) $display("step %0d %s got %f exp %f", n, what, fx2r(got), exp);
    end
  endfunction

  initial begin
    cfgq_t q;
    m10_t am [9];
    real xr [4], xn [4], ilp [2], v [2], i_d [2], i_f [2];
    int  e1, e2, cs;
    for (int k = 0; k < 9; k++) am[k] = build_a(k);
    wr = '0; u = '0; vin = to_fx(VIN);
    q = cfg_a();
    @(negedge clk);
    foreach (q[k]) begin wr = q[k]; @(negedge clk); end
    wr = '0;
    rst = 0;
    for (int k = 0; k < 4; k++) xr[k] = 0.0;
    @(negedge clk);
    running = 1;
    for (int n = 0; n < 6000; n++) begin
      int duty;
      duty = (n < 4000) ? 60 : 30;
      u[0] = (n % 100) < duty;
      u[1] = ((n + 50) % 100) < duty;
      // wait for the end of this step (cycle 9)
      while (cnt != 9) @(negedge clk);
      // reference step
      e1 = u[0] ? 0 : (xr[0] > 0.0 ? 1 : 2);
      e2 = u[1] ? 0 : ((xr[1] > 0.0 || xr[0] > 0.0) ? 1 : 2);
      cs = 3 * e1 + e2;
      if (rabs(xr[0]) > 0.05 && rabs(xr[1]) > 0.05) begin
        checks++;
        if (int'(case_idx) != cs) begin
          failures++;
          if (failures < 10) $display("step %0d case %0d exp %0d", n, case_idx, cs);
        end
      end
      cs = int'(case_idx);
      seen[cs]++;
      for (int r = 0; r < 4; r++) begin
        xn[r] = am[cs][r][4] * VIN;
        for (int c = 0; c < 4; c++) xn[r] += am[cs][r][c] * xr[c];
      end
      ilp[0] = xr[0]; ilp[1] = xr[1];
      xr = xn;
      for (int k = 0; k < 2; k++) begin
        v[k] = VIN - (xr[k] - ilp[k]) * ((k == 0 ? L1 : L2) / H);
        i_d[k] = v[k] * ((k == 0 ? m1 : m2) == SW_S_ON ? GON : GOFF);
      end
      i_f[0] = xr[0] - i_d[0];
      i_f[1] = xr[1] - i_d[1] + i_f[0];
      chk("iL1", n, x[0], xr[0], 0.01);
      chk("iL2", n, x[1], xr[1], 0.01);
      chk("vC1", n, x[2], xr[2], 0.01);
      chk("vC2", n, x[3], xr[3], 0.01);
      for (int k = 0; k < 2; k++) begin
        chk("vds", n, vds[k], v[k], 0.01);
        chk("id",  n, id[k],  i_d[k], 2.0);
        chk("if",  n, if_[k], i_f[k], 4.0);
      end
      checks++;
      if (u_q != u) failures++;
      @(negedge clk);
    end
    $display("final iL1 %f iL2 %f vC1 %f vC2 %f", fx2r(x[0]), fx2r(x[1]), fx2r(x[2]), fx2r(x[3]));
    for (int k = 0; k < 9; k++) $display("case %0d: %0d steps", k, seen[k]);
    checks++;
    if (seen[0] == 0 || seen[1] == 0 || seen[3] == 0 || seen[4] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
