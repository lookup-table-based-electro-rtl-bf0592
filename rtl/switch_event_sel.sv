// switch_event_sel - turn-on/turn-off detection and operand selection for
// the switching-loss lookup of one MOSFET.
//
// A turn-on is u(t) = 1 with u(t-h) = 0, a turn-off u(t) = 0 with
// u(t-h) = 1. The switching energy depends on the current after a turn-on and
// before a turn-off, and the loss is scaled by the blocking voltage before a
// turn-on and after a turn-off; the selector therefore picks iD(t), vDS(t-h)
// and Rg_on on a turn-on, and iD(t-h), vDS(t) and Rg_off otherwise. This
// follows the original design.
//
// Timing: combinational.
module switch_event_sel
  import ets_pkg::*;
(
  input  logic u_now,
  input  logic u_prev,
  input  fx_t  id_now,
  input  fx_t  id_prev,
  input  fx_t  vds_now,
  input  fx_t  vds_prev,
  input  fx_t  rg_on,
  input  fx_t  rg_off,
  output logic ev_on,
  output logic ev_off,
  output fx_t  id_sel,
  output fx_t  v_sel,
  output fx_t  rg_sel
);

  always_comb begin
    ev_on  = u_now && !u_prev;
    ev_off = !u_now && u_prev;
    if (ev_on) begin
      id_sel = id_now;
      v_sel  = vds_prev;
      rg_sel = rg_on;
    end else begin
      id_sel = id_prev;
      v_sel  = vds_now;
      rg_sel = rg_off;
    end
  end

endmodule
