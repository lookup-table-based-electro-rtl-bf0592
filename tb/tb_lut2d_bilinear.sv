// tb_lut2d_bilinear - loads the example MOSFET and diode voltage-drop tables
// of power module 1 (with the other module's writes present on the bus, to
// be ignored), then runs random queries (including points outside the
// grid) through the three-stage pipeline and compares the result with a
// double-precision bilinear interpolation of the same samples.
module tb_lut2d_bilinear;
  import ets_pkg::*;
  import ets_tb_pkg::*;

  logic    clk = 0;
  cfg_wr_t wr;
  logic    e_axis = 0, e_rd = 0, e_int = 0;
  fx_t     tj, i, vs, vd;
  int checks = 0, failures = 0;

  lut2d_bilinear #(.TGT(CFG_VS), .PM(1'b1), .N_T(NT), .N_I(NI)) dut_s (
    .clk, .wr, .e_axis, .e_rd, .e_int, .tj, .i, .v(vs));
  lut2d_bilinear #(.TGT(CFG_VD), .PM(1'b1), .N_T(NT), .N_I(NI)) dut_d (
    .clk, .wr, .e_axis, .e_rd, .e_int, .tj, .i, .v(vd));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfgq_t q;
    real tr, ir, es, ed;
    q = cfg_tables(1'b0);
    foreach (q[k]) q[k].data = ~q[k].data;  // module 0 gets garbage
    q = {q, cfg_tables(1'b1)};
    wr = '0;
    @(negedge clk);
    foreach (q[k]) begin
      wr = q[k];
      @(negedge clk);
    end
    wr = '0;
    for (int n = 0; n < 1000; n++) begin
      tr = 10.0 + real'($urandom_range(160000)) / 1000.0;
      ir = real'($urandom_range(700000)) / 1000.0 - 30.0;
      tj = to_fx(tr); i = to_fx(ir);
      e_axis = 1; @(negedge clk); e_axis = 0;
      tj = '0; i = '0;
      e_rd = 1;   @(negedge clk); e_rd = 0;
      e_int = 1;  @(negedge clk); e_int = 0;
      es = ref_v2(1'b0, tr, ir);
      ed = ref_v2(1'b1, tr, ir);
      checks += 2;
      if (rabs(fx2r(vs) - es) > 1e-5 + 1e-6 * rabs(es)) begin
        failures++;
        if (failures < 8) $display("vs T=%f i=%f got %f exp %f", tr, ir, fx2r(vs), es);
      end
      if (rabs(fx2r(vd) - ed) > 1e-5 + 1e-6 * rabs(ed)) begin
        failures++;
        if (failures < 8) $display("vd T=%f i=%f got %f exp %f", tr, ir, fx2r(vd), ed);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
