// osibc_ets_core - real-time electro-thermal model of an output-series
// interleaved boost converter built from two SiC power modules.
//
// Every time step (II = 10 clocks; 200 ns at 50 MHz) the core
//   1. solves the electrical model (electrical_solver): switch-state
//      identification, A-matrix lookup, x(t) = A [x(t-h) vin], device
//      voltages and currents;
//   2. computes the losses of each power module (power_loss): switching loss
//      from a 3D table with trilinear interpolation, conduction losses from
//      2D tables with bilinear interpolation;
//   3. advances the Cauer thermal network of each module (thermal_model),
//      whose junction temperatures feed the loss lookups of the next step.
// Power module 0 holds S1 and D1, module 1 holds S2 and D2. The inputs u,
// vin, rg_on, rg_off and t_amb are sampled in the first cycle of a step
// (u and vin) or used during it (the others). All tables are written by the
// host through `wr` before run is raised. Results are registered 9 clocks
// after the step starts; `valid` is high for one clock when they are.
// The structure follows the original design; the write port, the reset
// behaviour and the exact cycle of each stage are this design's.
module osibc_ets_core
  import ets_pkg::*;
#(
  parameter int  II      = 10,       // clocks per time step
  parameter real L1_H    = 400.0e-6, // inductance L1
  parameter real L2_H    = 400.0e-6, // inductance L2
  parameter real H_S     = 200.0e-9, // time step h
  parameter real G_ON    = 1000.0,   // switch on conductance
  parameter real G_OFF   = 0.0,      // switch off conductance
  parameter int  LUT_NT  = 2,        // temperature breakpoints
  parameter int  LUT_NR  = 4,        // gate-resistance breakpoints
  parameter int  LUT_NI  = 16        // current breakpoints
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        run,
  input  cfg_wr_t     wr,
  input  logic [1:0]  u,          // gate signals u1, u2
  input  fx_t         vin,
  input  fx_t         rg_on,
  input  fx_t         rg_off,
  input  fx_t         t_amb,
  output fx_t         x [4],      // iL1, iL2, vC1, vC2
  output fx_t         vds [2],
  output fx_t         id  [2],
  output fx_t         if_ [2],
  output sw_state_t   sw_state [2],
  output logic [3:0]  case_idx,   // active admittance case 0..8
  output fx_t         p_sw [2],   // switching loss S1, S2
  output fx_t         p_cs [2],   // conduction loss S1, S2
  output fx_t         p_cd [2],   // conduction loss D1, D2
  output fx_t         p_s  [2],   // total MOSFET loss S1, S2
  output fx_t         p_d  [2],   // diode loss D1, D2
  output logic [1:0]  ev_on,
  output logic [1:0]  ev_off,
  output fx_t         tj_s [2],   // junction temperature S1, S2
  output fx_t         tj_d [2],   // junction temperature D1, D2
  output fx_t         t_node [2][7],
  output logic        step_start,
  output logic        valid,
  output logic [31:0] step_count
);

  stage_t     stage;
  logic [1:0] u_q;

  step_sequencer #(.II(II)) u_seq (
    .clk, .rst, .run, .stage, .step_start, .valid, .step_count
  );

  electrical_solver #(
    .INV_GL1(L1_H / H_S), .INV_GL2(L2_H / H_S), .G_ON(G_ON), .G_OFF(G_OFF)
  ) u_elec (
    .clk, .rst, .stage, .wr, .u, .vin, .x, .u_q,
    .m1(sw_state[0]), .m2(sw_state[1]), .case_idx, .vds, .id, .if_
  );

  for (genvar k = 0; k < 2; k++) begin : g_pm
    power_loss #(.PM(1'(k)), .N_T(LUT_NT), .N_R(LUT_NR), .N_I(LUT_NI)) u_loss (
      .clk, .rst, .stage, .wr,
      .u_now(u_q[k]), .s_on(sw_state[k] == SW_S_ON), .d_on(sw_state[k] == SW_D_ON),
      .id(id[k]), .vds(vds[k]), .if_(if_[k]), .tj_s(tj_s[k]), .tj_d(tj_d[k]),
      .rg_on, .rg_off, .p_sw(p_sw[k]), .p_cs(p_cs[k]), .p_cd(p_cd[k]), .p_s(p_s[k]), .p_d(p_d[k]),
      .ev_on(ev_on[k]), .ev_off(ev_off[k])
    );

    thermal_model #(.PM(1'(k))) u_th (
      .clk, .rst, .en(stage.therm), .wr, .p_s(p_s[k]), .p_d(p_d[k]), .t_amb,
      .t(t_node[k]), .tj_s(tj_s[k]), .tj_d(tj_d[k])
    );
  end

endmodule
