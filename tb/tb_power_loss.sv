// tb_power_loss - loads the example loss tables of power module 1 and runs
// 600 steps with random gate sequences, device currents, voltages and
// junction temperatures. Each step's switching, MOSFET conduction and diode
// conduction losses are compared with a double-precision model built on the
// same samples (trilinear/bilinear interpolation, turn-on with iD(t),
// vDS(t-h), Rg_on and turn-off with iD(t-h), vDS(t), Rg_off). Turn-ons,
// turn-offs and conduction of both devices must all occur.
module tb_power_loss;
  import ets_pkg::*;
  import ets_tb_pkg::*;

  logic    clk = 0, rst = 1;
  stage_t  stage;
  cfg_wr_t wr;
  logic    u_now, s_on, d_on, ev_on, ev_off;
  fx_t     id, vds, if_, tj_s, tj_d, rg_on, rg_off;
  fx_t     p_sw, p_cs, p_cd, p_s, p_d;
  int checks = 0, failures = 0;
  int n_on = 0, n_off = 0, n_cs = 0, n_cd = 0;

  power_loss #(.PM(1'b1), .N_T(NT), .N_R(NR), .N_I(NI)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void chk(string what, int n, fx_t got, real exp);
    checks++;
    if (rabs(fx2r(got) - exp) > 0.01 + 1e-4 * rabs(exp)) begin
      failures++;
      if (failures < 10) $display("step %0d %s got %f exp %f", n, what, fx2r(got), exp);
    end
  endfunction

  initial begin
    cfgq_t q;
    real idr, vr, ifr, tsr, tdr, idp, vp, esw, ecs, ecd;
    logic up;
    wr = '0; stage = '0;
    u_now = 0; s_on = 0; d_on = 0; id = '0; vds = '0; if_ = '0;
    rg_on = to_fx(RGON); rg_off = to_fx(RGOFF);
    q = cfg_tables(1'b1);
    @(negedge clk);
    foreach (q[k]) begin wr = q[k]; @(negedge clk); end
    wr = '0;
    rst = 0;
    up = 0; idp = 0.0; vp = 0.0;
    for (int n = 0; n < 600; n++) begin
      u_now = ($urandom_range(2) == 0) ? ~up : up;
      s_on = u_now;
      d_on = !u_now && ($urandom_range(3) != 0);
      tsr = 20.0 + real'($urandom_range(130000)) / 1000.0;
      tdr = 20.0 + real'($urandom_range(130000)) / 1000.0;
      if (s_on) begin
        idr = real'($urandom_range(300000)) / 1000.0 - 10.0;
        vr  = idr / GON;
        ifr = 0.0;
      end else begin
        idr = 0.0;
        vr  = real'($urandom_range(400000)) / 1000.0;
        ifr = d_on ? real'($urandom_range(300000)) / 1000.0 : 0.0;
      end
      id = to_fx(idr); vds = to_fx(vr); if_ = to_fx(ifr);
      tj_s = to_fx(tsr); tj_d = to_fx(tdr);
      idr = fx2r(id); vr = fx2r(vds); ifr = fx2r(if_);
      // strobe cycles 4..8 of a step
      stage = '0; stage.axis = 1;   @(negedge clk);
      stage = '0; stage.lut_rd = 1; @(negedge clk);
      stage = '0; stage.interp = 1; @(negedge clk);
      stage = '0; stage.ploss = 1;  @(negedge clk);
      stage = '0; stage.therm = 1;  @(negedge clk);
      stage = '0;
      esw = 0.0;
      if (u_now && !up) begin
        esw = ref_m3(1'b0, tsr, RGON, idr) * vp;
        n_on++;
      end else if (!u_now && up) begin
        esw = ref_m3(1'b1, tsr, RGOFF, idp) * vr;
        n_off++;
      end
      ecs = s_on ? ref_v2(1'b0, tsr, rabs(idr)) * rabs(idr) : 0.0;
      ecd = d_on ? ref_v2(1'b1, tdr, rabs(ifr)) * rabs(ifr) : 0.0;
      if (s_on && idr != 0.0) n_cs++;
      if (d_on && ifr != 0.0) n_cd++;
      chk("p_sw", n, p_sw, esw);
      chk("p_cs", n, p_cs, ecs);
      chk("p_cd", n, p_cd, ecd);
      chk("p_s",  n, p_s,  esw + ecs);
      chk("p_d",  n, p_d,  ecd);
      checks++;
      if (ev_on != (u_now && !up) || ev_off != (!u_now && up)) failures++;
      up = u_now; idp = idr; vp = vr;
    end
    $display("turn-on %0d turn-off %0d MOSFET conduction %0d diode conduction %0d", n_on, n_off, n_cs, n_cd);
    checks++;
    if (n_on == 0 || n_off == 0 || n_cs == 0 || n_cd == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
