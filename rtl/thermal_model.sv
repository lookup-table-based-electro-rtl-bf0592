// thermal_model - junction-temperature model of one SiC power module.
//
// The module is a Cauer network of seven nodes: three RC sections of the
// MOSFET (node 1 is its junction), three of the diode (node 4 is its
// junction), both joined at node 7, the case/heat-sink node, which connects
// to the ambient through the heat-sink resistance. Discretised by backward
// Euler, the node temperatures obey T(t) = F T(t-h) + G [Ps Pd Tamb]^T with
// constant matrices F (7x7) and G (7x3) that the host computes offline and
// writes as one 7x10 matrix [F G] (target CFG_TH, address row*10 + col,
// coefficient format). One update is one parallel matrix-vector product.
// The network and the update equation are the original design's; the
// register map and the reset of every node to t_amb are this design's.
//
// Timing: en updates T on the next clock; rst loads t_amb into all nodes.
module thermal_model
  import ets_pkg::*;
#(
  parameter bit PM    = 1'b0,
  parameter int NODES = 7,
  parameter int NIN   = 3,
  parameter int JS    = 0,   // node index of the MOSFET junction
  parameter int JD    = 3    // node index of the diode junction
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    en,
  input  cfg_wr_t wr,
  input  fx_t     p_s,
  input  fx_t     p_d,
  input  fx_t     t_amb,
  output fx_t     t [NODES],
  output fx_t     tj_s,
  output fx_t     tj_d
);

  localparam int COLS = NODES + NIN;
  localparam int XS   = TFRAC - DFRAC;  // extra fraction bits of the state
  localparam int VW   = W + XS;

  coef_t fg [NODES][COLS];

  always_ff @(posedge clk) begin
    if (wr.we && wr.tgt == CFG_TH && wr.pm == PM && int'(wr.addr) < NODES * COLS)
      fg[int'(wr.addr) / COLS][int'(wr.addr) % COLS] <= wr.data;
  end

  logic signed [W-1:0]  ts [NODES];      // node temperatures, TFRAC format
  logic signed [VW-1:0] v [COLS];
  logic signed [W-1:0]  ts_next [NODES];
  logic signed [VW-1:0] t_amb_w;

  assign t_amb_w = VW'(t_amb) <<< XS;

  always_comb begin
    for (int k = 0; k < NODES; k++) v[k] = VW'(ts[k]);
    v[NODES]     = VW'(p_s) <<< XS;
    v[NODES + 1] = VW'(p_d) <<< XS;
    v[NODES + 2] = t_amb_w;
  end

  matvec #(.ROWS(NODES), .COLS(COLS), .VW(VW), .SH(CFRAC)) u_mv (.m(fg), .v, .y(ts_next));

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < NODES; k++) ts[k] <= t_amb_w[W-1:0];
    end else if (en) begin
      ts <= ts_next;
    end
  end

  always_comb
    for (int k = 0; k < NODES; k++) t[k] = ts[k] >>> XS;

  assign tj_s = t[JS];
  assign tj_d = t[JD];

endmodule
