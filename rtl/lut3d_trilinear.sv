// lut3d_trilinear - three-dimensional lookup table with trilinear
// interpolation, used for the switching-loss coefficients
// M = E(Tj, Rg, iD) / (h * v_const) of a MOSFET.
//
// Two planes are held, Mon (sel_off = 0) and Moff (sel_off = 1), each of
// N_T x N_R x N_I samples on uniform axes of junction temperature, gate
// resistance and drain current (address ((plane*N_T + t)*N_R + r)*N_I + i).
// A query finds the cell on each axis, reads its eight corner samples at once
// and interpolates along current (four times), then gate resistance (twice),
// then temperature. The method is the original design's; grid sizes, uniform
// spacing and the register map are this design's.
//
// Configuration (target CFG_M, power module PM): addr[AXIS_BIT] = 0 writes the
// table; addr[AXIS_BIT] = 1 writes axis registers, addr[2:0] = 0/1 T origin and
// reciprocal interval, 2/3 Rg, 4/5 I.
// Timing: e_axis, e_rd and e_int strobe three stages; m is valid after the
// clock edge that samples e_int.
module lut3d_trilinear
  import ets_pkg::*;
#(
  parameter bit PM  = 1'b0,
  parameter int N_T = 2,
  parameter int N_R = 4,
  parameter int N_I = 16
) (
  input  logic    clk,
  input  cfg_wr_t wr,
  input  logic    e_axis,
  input  logic    e_rd,
  input  logic    e_int,
  input  logic    sel_off,
  input  fx_t     tj,
  input  fx_t     rg,
  input  fx_t     i,
  output fx_t     m
);

  localparam int TW    = $clog2(N_T);
  localparam int RW    = $clog2(N_R);
  localparam int IW    = $clog2(N_I);
  localparam int PLANE = N_T * N_R * N_I;

  fx_t   tab [2 * PLANE];
  fx_t   x0  [3];
  coef_t inv [3];

  always_ff @(posedge clk) begin
    if (wr.we && wr.tgt == CFG_M && wr.pm == PM) begin
      if (wr.addr[AXIS_BIT]) begin
        if (wr.addr[2:1] != 2'd3) begin
          if (wr.addr[0]) inv[wr.addr[2:1]] <= wr.data;
          else            x0[wr.addr[2:1]]  <= wr.data;
        end
      end else if (int'(wr.addr) < 2 * PLANE) begin
        tab[int'(wr.addr)] <= wr.data;
      end
    end
  end

  // Axis stage
  logic [TW-1:0] t_idx_c, t_idx;
  logic [RW-1:0] r_idx_c, r_idx;
  logic [IW-1:0] i_idx_c, i_idx;
  fx_t           t_fr_c, r_fr_c, i_fr_c;
  fx_t           t_fr, r_fr, i_fr, t_fr2, r_fr2, i_fr2;
  logic          off_q;

  lut_axis #(.N(N_T)) u_ax_t (.x(tj), .x0(x0[0]), .inv_step(inv[0]), .idx(t_idx_c), .frac(t_fr_c));
  lut_axis #(.N(N_R)) u_ax_r (.x(rg), .x0(x0[1]), .inv_step(inv[1]), .idx(r_idx_c), .frac(r_fr_c));
  lut_axis #(.N(N_I)) u_ax_i (.x(i),  .x0(x0[2]), .inv_step(inv[2]), .idx(i_idx_c), .frac(i_fr_c));

  always_ff @(posedge clk) begin
    if (e_axis) begin
      t_idx <= t_idx_c;
      r_idx <= r_idx_c;
      i_idx <= i_idx_c;
      t_fr  <= t_fr_c;
      r_fr  <= r_fr_c;
      i_fr  <= i_fr_c;
      off_q <= sel_off;
    end
  end

  // Read stage: eight corners c[t][r][i]
  fx_t c [2][2][2];

  always_ff @(posedge clk) begin
    if (e_rd) begin
      for (int a = 0; a < 2; a++)
        for (int b = 0; b < 2; b++)
          for (int d = 0; d < 2; d++)
            c[a][b][d] <= tab[((int'(off_q) * N_T + int'(t_idx) + a) * N_R
                               + int'(r_idx) + b) * N_I + int'(i_idx) + d];
      t_fr2 <= t_fr;
      r_fr2 <= r_fr;
      i_fr2 <= i_fr;
    end
  end

  // Interpolation stage
  fx_t mi [2][2];
  fx_t mr [2];

  always_comb begin
    for (int a = 0; a < 2; a++) begin
      for (int b = 0; b < 2; b++)
        mi[a][b] = lerp(c[a][b][0], c[a][b][1], i_fr2);
      mr[a] = lerp(mi[a][0], mi[a][1], r_fr2);
    end
  end

  always_ff @(posedge clk) begin
    if (e_int)
      m <= lerp(mr[0], mr[1], t_fr2);
  end

endmodule
