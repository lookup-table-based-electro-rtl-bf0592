// lut2d_bilinear - two-dimensional lookup table with bilinear interpolation,
// used for the on-state voltage drop v_on(Tj, i) of a MOSFET or a diode.
//
// The table holds N_T x N_I samples (address t*N_I + i) on uniform axes of
// junction temperature and current. A query is processed in three stages:
// the axis stage finds the cell and the fractions, the read stage fetches the
// four corner samples, and the interpolation stage interpolates first along
// current at both temperatures and then along temperature. The method is the
// original design's; the grid size (2 temperatures, as drawn in the original
// design's illustration, by 16 currents), uniform spacing and the register
// map are this design's.
//
// Configuration (target TGT, power module PM): addr[AXIS_BIT] = 0 writes the
// table; addr[AXIS_BIT] = 1 writes the axis registers, addr[1:0] = 0 T origin,
// 1 T reciprocal interval, 2 I origin, 3 I reciprocal interval.
// Timing: e_axis, e_rd and e_int strobe the three stages in that order;
// v is valid after the clock edge that samples e_int.
module lut2d_bilinear
  import ets_pkg::*;
#(
  parameter cfg_tgt_t TGT = CFG_VS,
  parameter bit       PM  = 1'b0,
  parameter int       N_T = 2,
  parameter int       N_I = 16
) (
  input  logic    clk,
  input  cfg_wr_t wr,
  input  logic    e_axis,
  input  logic    e_rd,
  input  logic    e_int,
  input  fx_t     tj,
  input  fx_t     i,
  output fx_t     v
);

  localparam int TW = $clog2(N_T);
  localparam int IW = $clog2(N_I);

  fx_t   tab [N_T * N_I];
  fx_t   t_x0, i_x0;
  coef_t t_inv, i_inv;

  always_ff @(posedge clk) begin
    if (wr.we && wr.tgt == TGT && wr.pm == PM) begin
      if (wr.addr[AXIS_BIT]) begin
        case (wr.addr[1:0])
          2'd0: t_x0  <= wr.data;
          2'd1: t_inv <= wr.data;
          2'd2: i_x0  <= wr.data;
          default: i_inv <= wr.data;
        endcase
      end else if (int'(wr.addr) < N_T * N_I) begin
        tab[int'(wr.addr)] <= wr.data;
      end
    end
  end

  // Axis stage
  logic [TW-1:0] t_idx_c, t_idx;
  logic [IW-1:0] i_idx_c, i_idx;
  fx_t           t_fr_c, i_fr_c, t_fr, i_fr, t_fr2, i_fr2;

  lut_axis #(.N(N_T)) u_ax_t (.x(tj), .x0(t_x0), .inv_step(t_inv), .idx(t_idx_c), .frac(t_fr_c));
  lut_axis #(.N(N_I)) u_ax_i (.x(i),  .x0(i_x0), .inv_step(i_inv), .idx(i_idx_c), .frac(i_fr_c));

  always_ff @(posedge clk) begin
    if (e_axis) begin
      t_idx <= t_idx_c;
      i_idx <= i_idx_c;
      t_fr  <= t_fr_c;
      i_fr  <= i_fr_c;
    end
  end

  // Read stage: corners c[t][i]
  fx_t c [2][2];

  always_ff @(posedge clk) begin
    if (e_rd) begin
      for (int a = 0; a < 2; a++)
        for (int b = 0; b < 2; b++)
          c[a][b] <= tab[(int'(t_idx) + a) * N_I + int'(i_idx) + b];
      t_fr2 <= t_fr;
      i_fr2 <= i_fr;
    end
  end

  // Interpolation stage
  always_ff @(posedge clk) begin
    if (e_int)
      v <= lerp(lerp(c[0][0], c[0][1], i_fr2), lerp(c[1][0], c[1][1], i_fr2), t_fr2);
  end

endmodule
