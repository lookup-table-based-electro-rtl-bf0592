// switch_state_id - switch state identification of the two SiC power
// modules of the output-series interleaved boost converter.
//
// At the start of each time step (en high for one cycle) the on/off state of
// S1/D1 and S2/D2 is decided from the gate signals u(t) and the inductor
// currents of the previous step, and registered. The MOSFETs are forced
// commutated and follow their gate signal only. A diode is naturally
// commutated: D1 conducts when u1 = 0 and iL1 > 0; D2, which also carries the
// forward current of D1, conducts when u2 = 0 and iL2 > 0 or iL1 > 0. These
// conditions follow the two state diagrams of the original design; every
// transition depends only on the inputs, so the registered state is the
// identified state of the present step. The pair of states is encoded as one
// of the nine admittance cases, case_idx = 3*m1 + m2 (state encoding per
// sw_state_t), which addresses the coefficient-matrix table. The encoding and
// the reset state (both modules off) are this design's choice.
//
// Timing: outputs change one clock after en.
module switch_state_id
  import ets_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       en,
  input  logic [1:0] u,        // gate signals u1 (bit 0), u2 (bit 1)
  input  fx_t        il1,      // iL1(t-h)
  input  fx_t        il2,      // iL2(t-h)
  output sw_state_t  m1,       // S1/D1 state
  output sw_state_t  m2,       // S2/D2 state
  output logic [3:0] case_idx  // 0..8
);

  sw_state_t m1_n, m2_n;

  always_comb begin
    if (u[0])          m1_n = SW_S_ON;
    else if (il1 > 0)  m1_n = SW_D_ON;
    else               m1_n = SW_OFF;

    if (u[1])                    m2_n = SW_S_ON;
    else if (il2 > 0 || il1 > 0) m2_n = SW_D_ON;
    else                         m2_n = SW_OFF;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      m1       <= SW_OFF;
      m2       <= SW_OFF;
      case_idx <= 4'd8;
    end else if (en) begin
      m1       <= m1_n;
      m2       <= m2_n;
      case_idx <= 4'(3 * int'(m1_n) + int'(m2_n));
    end
  end

endmodule
