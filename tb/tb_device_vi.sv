// tb_device_vi - random operating points (inductor currents, a small
// current change, vin, switch states) are applied and vDS, iD and iF are
// compared with the device equations evaluated in double precision. The
// current step is chosen so that an on-state MOSFET sees a small vDS.
// The tolerance allows for the amplification of the current LSB by L/h.
module tb_device_vi;
  import ets_pkg::*;
  import ets_tb_pkg::*;

  fx_t        vin;
  fx_t        il_now [2], il_prev [2];
  logic [1:0] s_on;
  fx_t        vds [2], id [2], if_ [2];
  int checks = 0, failures = 0;

  device_vi dut (.*);

  function automatic real rnd(real span);
    return span * (real'($urandom_range(2000000)) / 1000000.0 - 1.0);
  endfunction

  function automatic void chk(string what, fx_t got, real exp, real tol);
    checks++;
    if (rabs(fx2r(got) - exp) > tol) begin
      failures++;
      if (failures < 8) $display("%s got %f exp %f", what, fx2r(got), exp);
    end
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real vr, inr [2], ipr [2], ev [2], ei [2], ef [2];
    for (int n = 0; n < 1000; n++) begin
      vr = 100.0 + rnd(50.0);
      vin = to_fx(vr); vr = fx2r(vin);
      s_on = 2'($urandom_range(3));
      for (int k = 0; k < 2; k++) begin
        real vt;
        // an on-state MOSFET blocks almost nothing, an off one up to 300 V
        vt = s_on[k] ? rnd(0.3) : 150.0 + rnd(150.0);
        ipr[k] = rnd(200.0);
        il_prev[k] = to_fx(ipr[k]); ipr[k] = fx2r(il_prev[k]);
        inr[k] = ipr[k] + (vr - vt) * H / (k == 0 ? L1 : L2);
        il_now[k] = to_fx(inr[k]); inr[k] = fx2r(il_now[k]);
      end
      #10;
      for (int k = 0; k < 2; k++) begin
        ev[k] = vr - (inr[k] - ipr[k]) * ((k == 0 ? L1 : L2) / H);
        ei[k] = ev[k] * (s_on[k] ? GON : GOFF);
      end
      ef[0] = inr[0] - ei[0];
      ef[1] = inr[1] - ei[1] + ef[0];
      for (int k = 0; k < 2; k++) begin
        chk("vds", vds[k], ev[k], 1e-3);
        chk("id",  id[k],  ei[k], 1e-3 * GON + 1e-3);
        chk("if",  if_[k], ef[k], 2e-3 * GON + 1e-3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
