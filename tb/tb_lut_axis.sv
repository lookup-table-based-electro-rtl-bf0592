// tb_lut_axis - random positions inside, below and above a 16-point axis
// (origin 0, interval 40) and a 2-point axis (origin 25, interval 125) are
// compared with the cell and fraction computed in double precision,
// including clamping at both ends.
module tb_lut_axis;
  import ets_pkg::*;
  import ets_tb_pkg::*;

  fx_t        x16, x2;
  logic [3:0] idx16;
  logic [0:0] idx2;
  fx_t        fr16, fr2;
  int checks = 0, failures = 0;

  lut_axis #(.N(16)) dut16 (.x(x16), .x0(to_fx(0.0)),  .inv_step(to_coef(1.0 / 40.0)),  .idx(idx16), .frac(fr16));
  lut_axis #(.N(2))  dut2  (.x(x2),  .x0(to_fx(25.0)), .inv_step(to_coef(1.0 / 125.0)), .idx(idx2),  .frac(fr2));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int  ei;
    real ef, xr;
    for (int n = 0; n < 2000; n++) begin
      xr = real'($urandom_range(800000)) / 1000.0 - 100.0;   // -100 .. 700
      x16 = to_fx(xr);
      x2  = to_fx(xr * 0.3);
      #10;
      locate(fx2r(x16), 0.0, 40.0, 16, ei, ef);
      checks++;
      if (int'(idx16) != ei || rabs(fx2r(fr16) - ef) > 1e-5) begin
        failures++;
        if (failures < 8) $display("x=%f idx %0d/%0d frac %f/%f", xr, idx16, ei, fx2r(fr16), ef);
      end
      locate(fx2r(x2), 25.0, 125.0, 2, ei, ef);
      checks++;
      if (int'(idx2) != ei || rabs(fx2r(fr2) - ef) > 1e-5) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
