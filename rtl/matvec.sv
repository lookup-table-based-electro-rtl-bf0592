// matvec - fully parallel fixed-point matrix-vector multiplier.
//
// y = M * v with one multiplier per matrix entry and one adder tree per row
// (a dot product per row), so a whole product is formed in one cycle. The
// matrix is in coefficient format, the vector and result in data format.
// Products are summed at full precision and the sum is rounded to nearest
// once per row, so the long-running state updates carry no rounding bias.
// It serves both matrix products of the model: the electrical state update
// (4x5) and the thermal network (7x10). Parallel evaluation follows the
// original design; the rounding scheme is this design's choice.
//
// The vector elements are VW bits wide (W by default) and the result is the
// sum shifted right by SH (CFRAC by default, so y has the vector's format).
// Timing: combinational; the caller registers y.
module matvec
  import ets_pkg::*;
#(
  parameter int ROWS = 4,
  parameter int COLS = 5,
  parameter int VW   = W,      // width of a vector element
  parameter int SH   = CFRAC   // right shift of the sum
) (
  input  coef_t                m [ROWS][COLS],
  input  logic signed [VW-1:0] v [COLS],
  output fx_t                  y [ROWS]
);

  localparam int AW2 = W + VW + $clog2(COLS + 1);

  always_comb begin
    for (int r = 0; r < ROWS; r++) begin
      logic signed [AW2-1:0] acc;
      acc = AW2'(1) <<< (SH - 1);
      for (int c = 0; c < COLS; c++)
        acc += AW2'(m[r][c]) * AW2'(v[c]);
      y[r] = acc[SH +: W];
    end
  end

endmodule
