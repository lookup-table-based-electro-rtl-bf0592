// device_vi - voltages and currents of the four semiconductors.
//
// From the new and previous inductor currents the inductor voltage is
// recovered as (iL(t) - iL(t-h)) * L/h, and the drain-source voltage of each
// MOSFET is vin minus that voltage. The drain current is vDS times the
// binary-resistor conductance of the MOSFET (G_ON when on, G_OFF when off).
// The diode currents follow from Kirchhoff's current law: iF1 = iL1 - iD1 and,
// since D2 also carries the current of D1, iF2 = iL2 - iD2 + iF1. These
// equations are the original design's; the parameters default to its
// converter (L = 400 uH, h = 200 ns, g_on = 1000 S, g_off = 0 S).
//
// Timing: combinational.
module device_vi
  import ets_pkg::*;
#(
  parameter real INV_GL1 = 2000.0,  // L1/h in ohm
  parameter real INV_GL2 = 2000.0,  // L2/h in ohm
  parameter real G_ON    = 1000.0,  // on-state conductance in S
  parameter real G_OFF   = 0.0      // off-state conductance in S
) (
  input  fx_t        vin,
  input  fx_t        il_now  [2],  // iL1(t), iL2(t)
  input  fx_t        il_prev [2],  // iL1(t-h), iL2(t-h)
  input  logic [1:0] s_on,         // MOSFET S1 (bit 0), S2 (bit 1) on
  output fx_t        vds [2],
  output fx_t        id  [2],
  output fx_t        if_ [2]
);

  localparam fx_t INV_GL1_FX = real_to_fx(INV_GL1);
  localparam fx_t INV_GL2_FX = real_to_fx(INV_GL2);
  localparam fx_t G_ON_FX    = real_to_fx(G_ON);
  localparam fx_t G_OFF_FX   = real_to_fx(G_OFF);

  always_comb begin
    vds[0] = vin - mul_dd(il_now[0] - il_prev[0], INV_GL1_FX);
    vds[1] = vin - mul_dd(il_now[1] - il_prev[1], INV_GL2_FX);
    id[0]  = mul_dd(vds[0], s_on[0] ? G_ON_FX : G_OFF_FX);
    id[1]  = mul_dd(vds[1], s_on[1] ? G_ON_FX : G_OFF_FX);
    if_[0] = il_now[0] - id[0];
    if_[1] = il_now[1] - id[1] + if_[0];
  end

endmodule
