// ets_pkg - shared types, fixed-point helpers and constants of the OS-IBC
// electro-thermal real-time model.
//
// All arithmetic is 40-bit two's-complement fixed point, the word length of
// the original design. The split between integer and fraction bits is this
// design's choice: data words (voltages, currents, temperatures, powers and
// table contents) carry DFRAC = 22 fraction bits, i.e. a range of +-131072
// with a resolution of 2.4e-7 (the switching power of one 200 ns step,
// E/h, reaches tens of kW); coefficient words (matrix entries of A, F and
// G, and reciprocal LUT intervals) carry CFRAC = 36 fraction bits, i.e. a
// range of +-8 with a resolution of 1.5e-11, which the tiny thermal
// coefficients (h/C is about 7e-7) need. The thermal node temperatures are
// held internally with TFRAC = 30 fraction bits (range +-512 C), because the
// slow nodes change by less than a data LSB per step near equilibrium. Products are formed at full width
// and truncated (arithmetic shift right), except in the matrix products,
// which round; results wrap on overflow.
//
// The host writes every table and coefficient through one write port,
// cfg_wr_t, decoded by target and power-module index. Within the lookup
// tables, address bit AXIS_BIT selects the axis registers instead of the
// table body.
package ets_pkg;

  localparam int W     = 40;  // word length
  localparam int DFRAC = 22;  // fraction bits of data words
  localparam int CFRAC = 36;  // fraction bits of coefficient words
  localparam int TFRAC = 30;  // fraction bits of the thermal node state
  localparam int AW    = 12;  // configuration address width
  localparam int AXIS_BIT = AW - 1;

  typedef logic signed [W-1:0] fx_t;    // data word
  typedef logic signed [W-1:0] coef_t;  // coefficient word

  localparam fx_t FX_ONE = fx_t'(64'sd1 <<< DFRAC);

  // Configuration targets of the host write port.
  typedef enum logic [2:0] {
    CFG_A  = 3'd0,  // coefficient matrices A, addr = case*20 + row*5 + col
    CFG_TH = 3'd1,  // thermal [F G], addr = row*10 + col
    CFG_M  = 3'd2,  // 3D LUT of Mon/Moff, axis registers at AXIS_BIT
    CFG_VS = 3'd3,  // 2D LUT of MOSFET drain-source voltage drop
    CFG_VD = 3'd4   // 2D LUT of diode forward voltage drop
  } cfg_tgt_t;

  typedef struct packed {
    logic          we;
    cfg_tgt_t      tgt;
    logic          pm;    // power module 0 (S1/D1) or 1 (S2/D2)
    logic [AW-1:0] addr;
    fx_t           data;
  } cfg_wr_t;

  // Switch state of one SiC power module (MOSFET plus its diode).
  typedef enum logic [1:0] {
    SW_S_ON = 2'd0,  // MOSFET on, diode off
    SW_D_ON = 2'd1,  // MOSFET off, diode on
    SW_OFF  = 2'd2   // both off
  } sw_state_t;

  // One strobe per pipeline stage of a time step (cycle numbers in brackets).
  typedef struct packed {
    logic ssi;     // [0] switch state identification
    logic a_rd;    // [1] coefficient matrix A read
    logic eq7;     // [2] x(t) = A [x(t-h) vin]
    logic eq8;     // [3] device voltages and currents
    logic axis;    // [4] LUT indices, switching event selection
    logic lut_rd;  // [5] LUT corner reads
    logic interp;  // [6] bi/trilinear interpolation
    logic ploss;   // [7] power losses
    logic therm;   // [8] thermal network, history update
  } stage_t;

  // Data x data product, result in data format.
  function automatic fx_t mul_dd(fx_t a, fx_t b);
    logic signed [2*W-1:0] p;
    p = a * b;
    return p[DFRAC +: W];
  endfunction

  // Data x coefficient product, result in data format.
  function automatic fx_t mul_dc(fx_t a, coef_t c);
    logic signed [2*W-1:0] p;
    p = a * c;
    return p[CFRAC +: W];
  endfunction

  // Linear interpolation a + (b - a) * f, f in data format (0..1).
  function automatic fx_t lerp(fx_t a, fx_t b, fx_t f);
    return a + mul_dd(b - a, f);
  endfunction

  function automatic fx_t fx_abs(fx_t a);
    return (a < 0) ? -a : a;
  endfunction

  // Real constant to data word (elaboration time only).
  function automatic fx_t real_to_fx(real r);
    return fx_t'(longint'(r * (2.0 ** DFRAC)));
  endfunction

endpackage
