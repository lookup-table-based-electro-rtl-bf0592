// lut_axis - locates an input value on one uniformly spaced axis of a
// lookup table.
//
// The position on the axis is (x - x0) * inv_step, where inv_step is the
// reciprocal of the breakpoint interval computed offline, so no divider is
// needed (as in the original design). The position is clamped to the table,
// then split into the index of the lower breakpoint, idx in 0..N-2, and the
// fraction between the two neighbouring breakpoints, frac in 0..1 (data
// format). Uniform spacing and clamping at the table ends are this design's
// choices.
//
// Timing: combinational.
module lut_axis
  import ets_pkg::*;
#(
  parameter int N = 16  // number of breakpoints, at least 2
) (
  input  fx_t                  x,
  input  fx_t                  x0,
  input  coef_t                inv_step,
  output logic [$clog2(N)-1:0] idx,
  output fx_t                  frac
);

  localparam longint NM1     = longint'(N) - 1;
  localparam fx_t    POS_MAX = fx_t'(NM1 <<< DFRAC);

  fx_t pos;
  fx_t ip;

  always_comb begin
    pos = mul_dc(x - x0, inv_step);
    if (pos < 0)        pos = '0;
    if (pos > POS_MAX)  pos = POS_MAX;
    ip = pos >>> DFRAC;
    if (ip >= fx_t'(NM1)) begin
      idx  = $clog2(N)'(N - 2);
      frac = FX_ONE;
    end else begin
      idx  = ip[$clog2(N)-1:0];
      frac = pos - (ip <<< DFRAC);
    end
  end

endmodule
