// coef_a_lut - table of the precomputed state-space coefficient matrices A
// of the electrical model, one 4x5 matrix per switch case.
//
// Solving the nodal equations on line would need a matrix inverse per step;
// instead the host computes A = D + E Y^-1 C offline for each of the nine
// reachable switch cases and writes the entries here (target CFG_A, address
// case*ROWS*COLS + row*COLS + col, coefficient format). Storing the matrices
// follows the original design; the write port is this design's own.
//
// Timing: when rd_en is high, the matrix of case_idx appears on `a` one
// clock later and is held until the next read. A write takes one clock.
module coef_a_lut
  import ets_pkg::*;
#(
  parameter int N_CASES = 9,
  parameter int ROWS    = 4,
  parameter int COLS    = 5
) (
  input  logic       clk,
  input  cfg_wr_t    wr,
  input  logic       rd_en,
  input  logic [3:0] case_idx,
  output coef_t      a [ROWS][COLS]
);

  localparam int DEPTH = N_CASES * ROWS * COLS;

  coef_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr.we && wr.tgt == CFG_A && int'(wr.addr) < DEPTH)
      mem[int'(wr.addr)] <= wr.data;
  end

  always_ff @(posedge clk) begin
    if (rd_en && int'(case_idx) < N_CASES) begin
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++)
          a[r][c] <= mem[int'(case_idx) * ROWS * COLS + r * COLS + c];
    end
  end

endmodule
