// power_loss - power-loss computation for one SiC power module (a MOSFET and
// its Schottky diode).
//
// Switching loss: a turn-on or turn-off of the MOSFET is detected against the
// previous step's gate signal; the selected current, gate resistance and
// junction temperature address the 3D table of M = E / (h * v_const), and
// the interpolated M times the selected blocking voltage is the switching
// power for this one step. Conduction loss: the on-state voltage drop
// v_on(Tj, |i|) is interpolated from a 2D table and multiplied by |i| for the
// MOSFET when it is on and for the diode when it conducts. The MOSFET loss
// is the sum of both; the diode has no switching loss (Schottky diode, no
// reverse recovery). These follow the original design. Using |i| and
// gating the conduction loss with the identified switch state are this
// design's choices.
//
// Timing: strobes from the step sequencer. stage.axis samples the device
// quantities, stage.lut_rd and stage.interp run the lookups, stage.ploss
// registers the losses, stage.therm shifts u, iD and vDS into the history
// registers used as (t-h) values by the next step.
module power_loss
  import ets_pkg::*;
#(
  parameter bit PM   = 1'b0,
  parameter int N_T  = 2,
  parameter int N_R  = 4,
  parameter int N_I  = 16
) (
  input  logic    clk,
  input  logic    rst,
  input  stage_t  stage,
  input  cfg_wr_t wr,
  input  logic    u_now,   // gate signal of this step
  input  logic    s_on,    // MOSFET conducting in this step
  input  logic    d_on,    // diode conducting in this step
  input  fx_t     id,      // iD(t)
  input  fx_t     vds,     // vDS(t)
  input  fx_t     if_,     // iF(t)
  input  fx_t     tj_s,    // MOSFET Tj(t-h)
  input  fx_t     tj_d,    // diode Tj(t-h)
  input  fx_t     rg_on,
  input  fx_t     rg_off,
  output fx_t     p_sw,    // MOSFET switching loss
  output fx_t     p_cs,    // MOSFET conduction loss
  output fx_t     p_cd,    // diode conduction loss
  output fx_t     p_s,     // total MOSFET loss
  output fx_t     p_d,     // total diode loss
  output logic    ev_on,   // turn-on in this step (valid from stage.axis on)
  output logic    ev_off   // turn-off in this step
);

  // History of the previous step
  logic u_prev;
  fx_t  id_prev, vds_prev;

  always_ff @(posedge clk) begin
    if (rst) begin
      u_prev   <= 1'b0;
      id_prev  <= '0;
      vds_prev <= '0;
    end else if (stage.therm) begin
      u_prev   <= u_now;
      id_prev  <= id;
      vds_prev <= vds;
    end
  end

  logic ev_on_c, ev_off_c;
  fx_t  id_sel, v_sel, rg_sel;

  switch_event_sel u_sel (
    .u_now, .u_prev, .id_now(id), .id_prev, .vds_now(vds), .vds_prev,
    .rg_on, .rg_off, .ev_on(ev_on_c), .ev_off(ev_off_c), .id_sel, .v_sel, .rg_sel
  );

  fx_t  v_sel_q, i_s_q, i_d_q;
  logic s_on_q, d_on_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      ev_on  <= 1'b0;
      ev_off <= 1'b0;
    end else if (stage.axis) begin
      ev_on   <= ev_on_c;
      ev_off  <= ev_off_c;
    end
    if (stage.axis) begin
      v_sel_q <= v_sel;
      i_s_q   <= fx_abs(id);
      i_d_q   <= fx_abs(if_);
      s_on_q  <= s_on;
      d_on_q  <= d_on;
    end
  end

  fx_t m, vs, vd;

  lut3d_trilinear #(.PM(PM), .N_T(N_T), .N_R(N_R), .N_I(N_I)) u_msw (
    .clk, .wr, .e_axis(stage.axis), .e_rd(stage.lut_rd), .e_int(stage.interp),
    .sel_off(ev_off_c), .tj(tj_s), .rg(rg_sel), .i(id_sel), .m
  );

  lut2d_bilinear #(.TGT(CFG_VS), .PM(PM), .N_T(N_T), .N_I(N_I)) u_vs (
    .clk, .wr, .e_axis(stage.axis), .e_rd(stage.lut_rd), .e_int(stage.interp),
    .tj(tj_s), .i(fx_abs(id)), .v(vs)
  );

  lut2d_bilinear #(.TGT(CFG_VD), .PM(PM), .N_T(N_T), .N_I(N_I)) u_vd (
    .clk, .wr, .e_axis(stage.axis), .e_rd(stage.lut_rd), .e_int(stage.interp),
    .tj(tj_d), .i(fx_abs(if_)), .v(vd)
  );

  fx_t p_sw_c, p_cs_c, p_cd_c;

  always_comb begin
    p_sw_c = (ev_on || ev_off) ? mul_dd(m, v_sel_q) : '0;
    p_cs_c = s_on_q ? mul_dd(vs, i_s_q) : '0;
    p_cd_c = d_on_q ? mul_dd(vd, i_d_q) : '0;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      p_sw <= '0;
      p_cs <= '0;
      p_cd <= '0;
      p_s  <= '0;
      p_d  <= '0;
    end else if (stage.ploss) begin
      p_sw <= p_sw_c;
      p_cs <= p_cs_c;
      p_cd <= p_cd_c;
      p_s  <= p_sw_c + p_cs_c;
      p_d  <= p_cd_c;
    end
  end

endmodule
