// electrical_solver - electrical model of the output-series interleaved
// boost converter (two boost legs whose output capacitors are in series).
//
// Inductors and capacitors are replaced by backward-Euler companion models
// and the switches by binary resistors, so one time step is a linear nodal
// problem whose solution, folded with the companion-source update, is the
// state-space step x(t) = A(case) [x(t-h) vin(t)]^T, with the state
// x = [iL1 iL2 vC1 vC2]. A depends only on which of the nine switch cases is
// active, so the nine matrices are precomputed and stored. Per step the
// solver identifies the switch states, reads A, forms the matrix-vector
// product and derives the device voltages and currents. The method is the
// original design's; the stage split below is this design's.
//
// Timing (strobes from the step sequencer):
//   stage.ssi  - gate signals and vin sampled, switch states identified
//   stage.a_rd - A(case) read from the table
//   stage.eq7  - x(t) registered; iL(t-h) kept for the device equations
//   stage.eq8  - vDS, iD, iF registered
// The state register x holds x(t) until the next step's stage.eq7, so it
// serves as x(t-h) of the next step; it resets to zero.
module electrical_solver
  import ets_pkg::*;
#(
  parameter real INV_GL1 = 2000.0,
  parameter real INV_GL2 = 2000.0,
  parameter real G_ON    = 1000.0,
  parameter real G_OFF   = 0.0
) (
  input  logic       clk,
  input  logic       rst,
  input  stage_t     stage,
  input  cfg_wr_t    wr,
  input  logic [1:0] u,
  input  fx_t        vin,
  output fx_t        x [4],      // iL1, iL2, vC1, vC2
  output logic [1:0] u_q,        // gate signals of the present step
  output sw_state_t  m1,
  output sw_state_t  m2,
  output logic [3:0] case_idx,
  output fx_t        vds [2],
  output fx_t        id  [2],
  output fx_t        if_ [2]
);

  fx_t vin_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      u_q   <= '0;
      vin_q <= '0;
    end else if (stage.ssi) begin
      u_q   <= u;
      vin_q <= vin;
    end
  end

  switch_state_id u_ssi (
    .clk, .rst, .en(stage.ssi), .u, .il1(x[0]), .il2(x[1]), .m1, .m2, .case_idx
  );

  coef_t a [4][5];

  coef_a_lut #(.N_CASES(9), .ROWS(4), .COLS(5)) u_alut (
    .clk, .wr, .rd_en(stage.a_rd), .case_idx, .a
  );

  fx_t xv [5];
  fx_t x_next [4];

  always_comb begin
    for (int k = 0; k < 4; k++) xv[k] = x[k];
    xv[4] = vin_q;
  end

  matvec #(.ROWS(4), .COLS(5)) u_mv (.m(a), .v(xv), .y(x_next));

  fx_t il_prev [2];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < 4; k++) x[k] <= '0;
      il_prev[0] <= '0;
      il_prev[1] <= '0;
    end else if (stage.eq7) begin
      x          <= x_next;
      il_prev[0] <= x[0];
      il_prev[1] <= x[1];
    end
  end

  fx_t vds_c [2], id_c [2], if_c [2];
  fx_t il_now [2];

  assign il_now[0] = x[0];
  assign il_now[1] = x[1];

  device_vi #(.INV_GL1(INV_GL1), .INV_GL2(INV_GL2), .G_ON(G_ON), .G_OFF(G_OFF)) u_dvi (
    .vin(vin_q), .il_now, .il_prev, .s_on({m2 == SW_S_ON, m1 == SW_S_ON}),
    .vds(vds_c), .id(id_c), .if_(if_c)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < 2; k++) begin
        vds[k] <= '0;
        id[k]  <= '0;
        if_[k] <= '0;
      end
    end else if (stage.eq8) begin
      vds <= vds_c;
      id  <= id_c;
      if_ <= if_c;
    end
  end

endmodule
