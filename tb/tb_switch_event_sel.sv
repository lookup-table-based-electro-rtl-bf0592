// tb_switch_event_sel - all four gate-signal histories with random
// operands; checks the event flags and that the turn-on selects iD(t),
// vDS(t-h) and Rg_on while every other case selects iD(t-h), vDS(t) and
// Rg_off.
module tb_switch_event_sel;
  import ets_pkg::*;

  logic u_now, u_prev, ev_on, ev_off;
  fx_t  id_now, id_prev, vds_now, vds_prev, rg_on, rg_off, id_sel, v_sel, rg_sel;
  int checks = 0, failures = 0;

  switch_event_sel dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      {u_now, u_prev} = 2'(n % 4);
      id_now = fx_t'($urandom); id_prev = fx_t'($urandom);
      vds_now = fx_t'($urandom); vds_prev = fx_t'($urandom);
      rg_on = fx_t'($urandom); rg_off = fx_t'($urandom);
      #10;
      checks++;
      if (ev_on != (u_now && !u_prev) || ev_off != (!u_now && u_prev)) failures++;
      checks++;
      if (u_now && !u_prev) begin
        if (id_sel != id_now || v_sel != vds_prev || rg_sel != rg_on) failures++;
      end else begin
        if (id_sel != id_prev || v_sel != vds_now || rg_sel != rg_off) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
