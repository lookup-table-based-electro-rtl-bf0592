// tb_osibc_workload - the validation run of the reference converter:
// 0.2 s of simulated time (1,000,000 steps of 200 ns, 10 million clocks)
// with 50 kHz PWM at duty 0.6, gate signals 180 degrees apart, starting from
// rest, with the core at its default parameters.
//
// Every step is compared with a double-precision model as in
// tb_osibc_ets_core (electrical state and device quantities, power losses
// from the core's device quantities, all thermal nodes). At the end the
// averages over the last PWM period must show the expected operating point
// of a 120 V to 600 V output-series interleaved boost converter at 36 kW:
// each inductor carrying 150 A and each capacitor holding 300 V (within 3%),
// and the MOSFET S2 hotter than S1.
module tb_osibc_workload;
  import ets_pkg::*;
  import ets_tb_pkg::*;

  logic        clk = 0, rst = 1, run = 0;
  cfg_wr_t     wr;
  logic [1:0]  u;
  fx_t         vin, rg_on, rg_off, t_amb;
  fx_t         x [4], vds [2], id [2], if_ [2];
  sw_state_t   sw_state [2];
  logic [3:0]  case_idx;
  fx_t         p_sw [2], p_cs [2], p_cd [2], p_s [2], p_d [2];
  logic [1:0]  ev_on, ev_off;
  fx_t         tj_s [2], tj_d [2];
  fx_t         t_node [2][7];
  logic        step_start, valid;
  logic [31:0] step_count;

  localparam int N_STEPS = 1000000;
  int checks = 0, failures = 0;
  real avg [4] = '{0.0, 0.0, 0.0, 0.0};
  int seen [9];
  int n_on [2], n_off [2], n_dcond [2];

  osibc_ets_core dut (.*);

  always #10 clk = ~clk;   // 50 MHz

  initial begin
    repeat (11000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Timing: step_start every 10 clocks, valid 9 clocks after it.
  int cyc = 0, t_start = -1, t_prev_start = -1, n_timing_bad = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst) begin
      // registers are not yet initialised
    end else if (step_start) begin
      if (t_start >= 0 && cyc - t_start != 10) n_timing_bad <= n_timing_bad + 1;
      t_start <= cyc;
    end
    if (!rst && valid && cyc - t_start != 9) n_timing_bad <= n_timing_bad + 1;
  end

  function automatic void chk(string what, int n, fx_t got, real exp, real tol);
    checks++;
    if (rabs(fx2r(got) - exp) > tol) begin
      failures++;
      if (failures < 12) $display("step %0d %s got %f exp %f", n, what, fx2r(got), exp);
    end
  endfunction

  initial begin
    cfgq_t q;
    m10_t  am [9], fg;
    real   xr [4], xn [4], ilp [2], v [2], i_d [2], i_f [2];
    real   tr [2][7], tn [7], ts_prev [2], td_prev [2];
    real   vp [2], idp [2], es, ec, ed, uin [3];
    logic  up [2];
    int    e1, e2, cs, duty;

    for (int k = 0; k < 9; k++) am[k] = build_a(k);
    fg = build_fg();
    wr = '0; u = '0;
    vin = to_fx(VIN); rg_on = to_fx(RGON); rg_off = to_fx(RGOFF); t_amb = to_fx(TAMB);
    q = {cfg_a(), cfg_th(1'b0), cfg_th(1'b1), cfg_tables(1'b0), cfg_tables(1'b1)};
    @(negedge clk);
    foreach (q[k]) begin wr = q[k]; @(negedge clk); end
    wr = '0;
    rst = 0;
    for (int k = 0; k < 4; k++) xr[k] = 0.0;
    for (int m = 0; m < 2; m++) begin
      for (int r = 0; r < 7; r++) tr[m][r] = TAMB;
      up[m] = 0; vp[m] = 0.0; idp[m] = 0.0;
    end
    @(negedge clk);
    run = 1;
    for (int n = 0; n < N_STEPS; n++) begin
      duty = 60;
      if (n >= N_STEPS - 100)
        for (int k = 0; k < 4; k++) avg[k] += fx2r(x[k]) / 100.0;
      u[0] = (n % 100) < duty;
      u[1] = ((n + 50) % 100) < duty;
      @(negedge clk);            // sampled at the step start
      while (!valid) @(negedge clk);
      for (int m = 0; m < 2; m++) begin
        ts_prev[m] = tr[m][0];
        td_prev[m] = tr[m][3];
      end
      // electrical reference
      e1 = u[0] ? 0 : (xr[0] > 0.0 ? 1 : 2);
      e2 = u[1] ? 0 : ((xr[1] > 0.0 || xr[0] > 0.0) ? 1 : 2);
      cs = 3 * e1 + e2;
      if (rabs(xr[0]) > 0.05 && rabs(xr[1]) > 0.05) begin
        checks++;
        if (int'(case_idx) != cs) failures++;
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
        i_d[k] = v[k] * (sw_state[k] == SW_S_ON ? GON : GOFF);
      end
      i_f[0] = xr[0] - i_d[0];
      i_f[1] = xr[1] - i_d[1] + i_f[0];
      chk("iL1", n, x[0], xr[0], 0.02);
      chk("iL2", n, x[1], xr[1], 0.02);
      chk("vC1", n, x[2], xr[2], 0.02);
      chk("vC2", n, x[3], xr[3], 0.02);
      for (int k = 0; k < 2; k++) begin
        chk("vds", n, vds[k], v[k], 0.02);
        chk("id",  n, id[k],  i_d[k], 4.0);
        chk("if",  n, if_[k], i_f[k], 8.0);
      end
      // losses from the core's own device quantities and Tj(t-h)
      for (int m = 0; m < 2; m++) begin
        real cid, cv, cif;
        bit  on_ev, off_ev;
        cid = fx2r(id[m]); cv = fx2r(vds[m]); cif = fx2r(if_[m]);
        on_ev  = u[m] && !up[m];
        off_ev = !u[m] && up[m];
        es = 0.0;
        if (on_ev)  begin es = ref_m3(1'b0, ts_prev[m], RGON, cid) * vp[m]; n_on[m]++; end
        if (off_ev) begin es = ref_m3(1'b1, ts_prev[m], RGOFF, idp[m]) * cv; n_off[m]++; end
        ec = (sw_state[m] == SW_S_ON) ? ref_v2(1'b0, ts_prev[m], rabs(cid)) * rabs(cid) : 0.0;
        ed = (sw_state[m] == SW_D_ON) ? ref_v2(1'b1, td_prev[m], rabs(cif)) * rabs(cif) : 0.0;
        if (sw_state[m] == SW_D_ON && cif > 1.0) n_dcond[m]++;
        chk("p_sw", n, p_sw[m], es, 0.05 + 1e-3 * rabs(es));
        chk("p_s",  n, p_s[m],  es + ec, 0.05 + 1e-3 * rabs(es + ec));
        chk("p_d",  n, p_d[m],  ed, 0.05 + 1e-3 * ed);
        checks++;
        if (ev_on[m] != on_ev || ev_off[m] != off_ev) failures++;
        up[m] = u[m]; vp[m] = cv; idp[m] = cid;
        // thermal network
        uin[0] = fx2r(p_s[m]); uin[1] = fx2r(p_d[m]); uin[2] = TAMB;
        for (int r = 0; r < 7; r++) begin
          tn[r] = 0.0;
          for (int c = 0; c < 7; c++) tn[r] += fg[r][c] * tr[m][c];
          for (int c = 0; c < 3; c++) tn[r] += fg[r][7 + c] * uin[c];
        end
        for (int r = 0; r < 7; r++) begin
          tr[m][r] = tn[r];
          chk("T", n, t_node[m][r], tn[r], 1e-3);
        end
      end
    end
    run = 0;
    $display("after %0d steps: iL1 %.3f A iL2 %.3f A vC1 %.3f V vC2 %.3f V", step_count,
             fx2r(x[0]), fx2r(x[1]), fx2r(x[2]), fx2r(x[3]));
    $display("Tj S1 %.4f D1 %.4f S2 %.4f D2 %.4f C", fx2r(tj_s[0]), fx2r(tj_d[0]), fx2r(tj_s[1]), fx2r(tj_d[1]));
    for (int k = 0; k < 9; k++) $display("case %0d: %0d steps", k, seen[k]);
    for (int m = 0; m < 2; m++)
      $display("module %0d: turn-on %0d turn-off %0d diode conduction %0d", m, n_on[m], n_off[m], n_dcond[m]);
    $display("last-period averages: iL1 %.3f A iL2 %.3f A vC1 %.3f V vC2 %.3f V", avg[0], avg[1], avg[2], avg[3]);
    for (int k = 0; k < 4; k++) begin
      real nom;
      nom = (k < 2) ? 150.0 : 300.0;
      checks++;
      if (rabs(avg[k] - nom) > 0.03 * nom) failures++;
    end
    checks++;
    if (tj_s[1] <= tj_s[0]) failures++;
    // mechanisms
    foreach (seen[k]) if (k == 0 || k == 1 || k == 3) begin
      checks++;
      if (seen[k] == 0) begin failures++; $display("case %0d never occurred", k); end
    end
    for (int m = 0; m < 2; m++) begin
      checks += 5;
      if (n_on[m] == 0)    failures++;
      if (n_off[m] == 0)   failures++;
      if (n_dcond[m] == 0) failures++;
      if (fx2r(tj_s[m]) <= TAMB + 1e-3) failures++;
      if (fx2r(tj_d[m]) <= TAMB + 1e-3) failures++;
    end
    checks++;
    if (n_timing_bad != 0 || step_count != 32'(N_STEPS)) begin
      failures++;
      $display("timing errors %0d, steps %0d", n_timing_bad, step_count);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
