// ets_tb_pkg - reference models and configuration data shared by the
// testbenches.
//
// Everything here is computed in double-precision reals, independently of
// the fixed-point RTL:
//   * the converter and thermal parameters (input 120 V, L = 400 uH,
//     C = 470 uF, R = 10 ohm, g_on = 1000 S, g_off = 0 S, h = 200 ns,
//     Cauer network Rth = [0.045 0.041 0.046] K/W, Cth = [0.283 0.918 0.414]
//     J/K for both MOSFET and diode, heat sink 0.01 K/W and 0.1 J/K);
//   * the nine state-space matrices A = D + E Y^-1 C of the electrical model;
//   * the backward-Euler thermal matrices F = (I - h At)^-1 and G = F h Bt;
//   * example device tables: on-state voltages and switching energies given
//     by simple smooth formulas (below), standing in for datasheet data;
//   * the list of host writes that loads all of it into the core.
package ets_tb_pkg;
  import ets_pkg::*;

  // Converter (values of the reference design)
  localparam real VIN   = 120.0;
  localparam real L1    = 400.0e-6;
  localparam real L2    = 400.0e-6;
  localparam real C1    = 470.0e-6;
  localparam real C2    = 470.0e-6;
  localparam real RLOAD = 10.0;
  localparam real H     = 200.0e-9;
  localparam real GON   = 1000.0;
  localparam real GOFF  = 0.0;
  localparam real RGON  = 3.3;
  localparam real RGOFF = 3.9;
  localparam real TAMB  = 25.0;
  localparam real VCONST = 600.0;  // reference voltage of the switching energies

  // Table grids (uniform)
  localparam int  NT = 2;
  localparam int  NR = 4;
  localparam int  NI = 16;
  localparam real T0 = 25.0,  TSTEP = 125.0;
  localparam real R0 = 2.0,   RSTEP = 1.0;
  localparam real I0 = 0.0,   ISTEP = 40.0;

  typedef real m10_t [10][10];
  typedef cfg_wr_t cfgq_t [$];

  function automatic fx_t to_fx(real r);
    return fx_t'(longint'(r * (2.0 ** DFRAC)));
  endfunction

  function automatic coef_t to_coef(real r);
    return coef_t'(longint'(r * (2.0 ** CFRAC)));
  endfunction

  function automatic real fx2r(fx_t v);
    return real'(longint'(v)) / (2.0 ** DFRAC);
  endfunction

  function automatic real rabs(real a);
    return (a < 0.0) ? -a : a;
  endfunction

  // Gauss-Jordan inverse of the leading n x n block.
  function automatic m10_t minv(m10_t a, int n);
    m10_t b;
    for (int r = 0; r < n; r++)
      for (int c = 0; c < n; c++) b[r][c] = (r == c) ? 1.0 : 0.0;
    for (int p = 0; p < n; p++) begin
      int  piv = p;
      real f;
      for (int r = p + 1; r < n; r++) if (rabs(a[r][p]) > rabs(a[piv][p])) piv = r;
      for (int c = 0; c < n; c++) begin
        real t;
        t = a[p][c]; a[p][c] = a[piv][c]; a[piv][c] = t;
        t = b[p][c]; b[p][c] = b[piv][c]; b[piv][c] = t;
      end
      f = a[p][p];
      for (int c = 0; c < n; c++) begin a[p][c] /= f; b[p][c] /= f; end
      for (int r = 0; r < n; r++) if (r != p) begin
        real g = a[r][p];
        for (int c = 0; c < n; c++) begin
          a[r][c] -= g * a[p][c];
          b[r][c] -= g * b[p][c];
        end
      end
    end
    return b;
  endfunction

  // State-space matrix A (4x5) of switch case cs = 3*m1 + m2,
  // m = 0: MOSFET on, 1: diode on, 2: both off. x = [iL1 iL2 vC1 vC2], u = vin.
  function automatic m10_t build_a(int cs);
    m10_t y, yi, c, a;
    real gl1 = H / L1, gl2 = H / L2, gc1 = C1 / H, gc2 = C2 / H, g = 1.0 / RLOAD;
    real g1, g2, g3, g4;
    int m1 = cs / 3, m2 = cs % 3;
    g1 = (m1 == 0) ? GON : GOFF;  g2 = (m1 == 1) ? GON : GOFF;
    g3 = (m2 == 0) ? GON : GOFF;  g4 = (m2 == 1) ? GON : GOFF;
    for (int r = 0; r < 10; r++) for (int k = 0; k < 10; k++) begin
      y[r][k] = 0.0; c[r][k] = 0.0; a[r][k] = 0.0;
    end
    // nodal admittance matrix, nodes U1..U4
    y[0][0] = gl1 + g1 + g2;  y[0][1] = -g2;
    y[1][0] = -g2;  y[1][1] = g + gc1 + g2;  y[1][2] = -gc1;  y[1][3] = -g;
    y[2][1] = -gc1; y[2][2] = gc1 + gl2 + g3 + gc2;  y[2][3] = -gc2;
    y[3][1] = -g;   y[3][2] = -gc2;  y[3][3] = gc2 + g + g4;
    // companion current sources from [x(t-h) vin]
    c[0][0] = 1.0;  c[0][4] = gl1;
    c[1][2] = gc1;
    c[2][1] = 1.0;  c[2][2] = -gc1;  c[2][3] = gc2;  c[2][4] = gl2;
    c[3][3] = -gc2;
    yi = minv(y, 4);
    // U = yi * c (4x5), then x(t) = D [x vin] + E U
    for (int k = 0; k < 5; k++) begin
      real u [4];
      for (int r = 0; r < 4; r++) begin
        u[r] = 0.0;
        for (int j = 0; j < 4; j++) u[r] += yi[r][j] * c[j][k];
      end
      a[0][k] = ((k == 0) ? 1.0 : 0.0) + ((k == 4) ? gl1 : 0.0) - gl1 * u[0];
      a[1][k] = ((k == 1) ? 1.0 : 0.0) + ((k == 4) ? gl2 : 0.0) - gl2 * u[2];
      a[2][k] = u[1] - u[2];
      a[3][k] = u[2] - u[3];
    end
    return a;
  endfunction

  // Thermal matrix [F G] (7x10) of one power module.
  function automatic m10_t build_fg();
    real rth [3] = '{0.045, 0.041, 0.046};
    real cth [3] = '{0.283, 0.918, 0.414};
    real rh = 0.01, ch = 0.1;
    real cap [7];
    m10_t k, m, mi, fg;
    for (int r = 0; r < 10; r++) for (int j = 0; j < 10; j++) begin
      k[r][j] = 0.0; fg[r][j] = 0.0;
    end
    for (int s = 0; s < 2; s++) begin
      for (int j = 0; j < 3; j++) begin
        int a = 3 * s + j;
        int b = (j == 2) ? 6 : a + 1;
        real g = 1.0 / rth[j];
        cap[a] = cth[j];
        k[a][a] += g; k[b][b] += g; k[a][b] -= g; k[b][a] -= g;
      end
    end
    cap[6] = ch;
    k[6][6] += 1.0 / rh;
    // (I - h At) with At = -C^-1 K
    for (int r = 0; r < 7; r++)
      for (int j = 0; j < 7; j++) m[r][j] = ((r == j) ? 1.0 : 0.0) + H * k[r][j] / cap[r];
    mi = minv(m, 7);
    for (int r = 0; r < 7; r++) begin
      for (int j = 0; j < 7; j++) fg[r][j] = mi[r][j];
      fg[r][7] = mi[r][0] * H / cap[0];          // Ps into node 1
      fg[r][8] = mi[r][3] * H / cap[3];          // Pd into node 4
      fg[r][9] = mi[r][6] * H / (rh * cap[6]);   // Tamb through the heat sink
    end
    return fg;
  endfunction

  // Example device data (smooth, datasheet-like shapes).
  function automatic real von_s(real t, real i);      // MOSFET vDS(on)
    return (4.0e-3 * (1.0 + 0.006 * (t - 25.0))) * i + 2.0e-6 * i * i;
  endfunction
  function automatic real von_d(real t, real i);      // diode vF
    return 0.9 - 0.001 * (t - 25.0) + (3.0e-3 * (1.0 + 0.004 * (t - 25.0))) * i
           + (i < 40.0 ? -0.005 * (40.0 - i) : 0.0);
  endfunction
  function automatic real msw(bit off, real t, real rg, real i);  // E/(h*vconst)
    real e;
    if (off) e = (0.1e-3 + 1.0e-5 * i + 4.0e-9 * i * i) * (1.0 + 0.08 * (rg - 3.0));
    else     e = (0.2e-3 + 1.5e-5 * i + 1.0e-8 * i * i) * (1.0 + 0.12 * (rg - 3.0));
    e = e * (1.0 + 0.002 * (t - 25.0));
    return e / (H * VCONST);
  endfunction

  function automatic real grid_t(int k); return T0 + TSTEP * k; endfunction
  function automatic real grid_r(int k); return R0 + RSTEP * k; endfunction
  function automatic real grid_i(int k); return I0 + ISTEP * k; endfunction

  // Cell and fraction on a uniform axis, clamped to the table.
  function automatic void locate(real x, real x0, real step, int n, output int idx, output real fr);
    real p = (x - x0) / step;
    if (p < 0.0) p = 0.0;
    if (p > real'(n - 1)) p = real'(n - 1);
    idx = int'($floor(p));
    if (idx > n - 2) idx = n - 2;
    fr = p - real'(idx);
  endfunction

  // Reference bilinear lookup of the 2D tables (diode = 1 for vF).
  function automatic real ref_v2(bit diode, real t, real i);
    int it, ii;
    real ft, fi, v [2][2], a, b;
    locate(t, T0, TSTEP, NT, it, ft);
    locate(i, I0, ISTEP, NI, ii, fi);
    for (int p = 0; p < 2; p++)
      for (int q = 0; q < 2; q++)
        v[p][q] = diode ? von_d(grid_t(it + p), grid_i(ii + q)) : von_s(grid_t(it + p), grid_i(ii + q));
    a = v[0][0] + (v[0][1] - v[0][0]) * fi;
    b = v[1][0] + (v[1][1] - v[1][0]) * fi;
    return a + (b - a) * ft;
  endfunction

  // Reference trilinear lookup of the 3D table.
  function automatic real ref_m3(bit off, real t, real rg, real i);
    int it, ir, ii;
    real ft, fr, fi, mr [2];
    locate(t, T0, TSTEP, NT, it, ft);
    locate(rg, R0, RSTEP, NR, ir, fr);
    locate(i, I0, ISTEP, NI, ii, fi);
    for (int p = 0; p < 2; p++) begin
      real mi [2];
      for (int q = 0; q < 2; q++) begin
        real lo = msw(off, grid_t(it + p), grid_r(ir + q), grid_i(ii));
        real hi = msw(off, grid_t(it + p), grid_r(ir + q), grid_i(ii + 1));
        mi[q] = lo + (hi - lo) * fi;
      end
      mr[p] = mi[0] + (mi[1] - mi[0]) * fr;
    end
    return mr[0] + (mr[1] - mr[0]) * ft;
  endfunction

  function automatic cfg_wr_t mkw(cfg_tgt_t tgt, bit pm, int addr, fx_t data);
    cfg_wr_t w;
    w.we = 1'b1; w.tgt = tgt; w.pm = pm; w.addr = AW'(addr); w.data = data;
    return w;
  endfunction

  localparam int AXREG = 1 << AXIS_BIT;

  // Writes for the loss tables of power module pm.
  function automatic cfgq_t cfg_tables(bit pm);
    cfgq_t q;
    q.push_back(mkw(CFG_M, pm, AXREG + 0, to_fx(T0)));
    q.push_back(mkw(CFG_M, pm, AXREG + 1, to_coef(1.0 / TSTEP)));
    q.push_back(mkw(CFG_M, pm, AXREG + 2, to_fx(R0)));
    q.push_back(mkw(CFG_M, pm, AXREG + 3, to_coef(1.0 / RSTEP)));
    q.push_back(mkw(CFG_M, pm, AXREG + 4, to_fx(I0)));
    q.push_back(mkw(CFG_M, pm, AXREG + 5, to_coef(1.0 / ISTEP)));
    for (int o = 0; o < 2; o++)
      for (int t = 0; t < NT; t++)
        for (int r = 0; r < NR; r++)
          for (int i = 0; i < NI; i++)
            q.push_back(mkw(CFG_M, pm, ((o * NT + t) * NR + r) * NI + i,
                            to_fx(msw(o[0], grid_t(t), grid_r(r), grid_i(i)))));
    for (int d = 0; d < 2; d++) begin
      cfg_tgt_t tg = (d != 0) ? CFG_VD : CFG_VS;
      q.push_back(mkw(tg, pm, AXREG + 0, to_fx(T0)));
      q.push_back(mkw(tg, pm, AXREG + 1, to_coef(1.0 / TSTEP)));
      q.push_back(mkw(tg, pm, AXREG + 2, to_fx(I0)));
      q.push_back(mkw(tg, pm, AXREG + 3, to_coef(1.0 / ISTEP)));
      for (int t = 0; t < NT; t++)
        for (int i = 0; i < NI; i++)
          q.push_back(mkw(tg, pm, t * NI + i,
                          to_fx((d != 0) ? von_d(grid_t(t), grid_i(i)) : von_s(grid_t(t), grid_i(i)))));
    end
    return q;
  endfunction

  // Writes for the nine A matrices.
  function automatic cfgq_t cfg_a();
    cfgq_t q;
    for (int cs = 0; cs < 9; cs++) begin
      m10_t a = build_a(cs);
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 5; c++)
          q.push_back(mkw(CFG_A, 1'b0, cs * 20 + r * 5 + c, to_coef(a[r][c])));
    end
    return q;
  endfunction

  // Writes for [F G] of power module pm.
  function automatic cfgq_t cfg_th(bit pm);
    cfgq_t q;
    m10_t fg = build_fg();
    for (int r = 0; r < 7; r++)
      for (int c = 0; c < 10; c++)
        q.push_back(mkw(CFG_TH, pm, r * 10 + c, to_coef(fg[r][c])));
    return q;
  endfunction

endpackage
