// tb_lut3d_trilinear - loads the example Mon/Moff tables of power module 0,
// then runs random queries of both planes (junction temperature, gate
// resistance and current, partly outside the grid) through the pipeline and
// compares with a double-precision trilinear interpolation of the samples.
module tb_lut3d_trilinear;
  import ets_pkg::*;
  import ets_tb_pkg::*;

  logic    clk = 0;
  cfg_wr_t wr;
  logic    e_axis = 0, e_rd = 0, e_int = 0, sel_off = 0;
  fx_t     tj, rg, i, m;
  int checks = 0, failures = 0;

  lut3d_trilinear #(.PM(1'b0), .N_T(NT), .N_R(NR), .N_I(NI)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfgq_t q;
    real tr, rr, ir, e;
    bit  off;
    q = cfg_tables(1'b1);
    foreach (q[k]) q[k].data = ~q[k].data;  // module 1 gets garbage
    q = {cfg_tables(1'b0), q};
    wr = '0;
    @(negedge clk);
    foreach (q[k]) begin
      wr = q[k];
      @(negedge clk);
    end
    wr = '0;
    for (int n = 0; n < 1000; n++) begin
      tr = 10.0 + real'($urandom_range(160000)) / 1000.0;
      rr = 1.5 + real'($urandom_range(4000)) / 1000.0;
      ir = real'($urandom_range(700000)) / 1000.0 - 30.0;
      off = 1'($urandom_range(1));
      tj = to_fx(tr); rg = to_fx(rr); i = to_fx(ir); sel_off = off;
      e_axis = 1; @(negedge clk); e_axis = 0;
      tj = '0; rg = '0; i = '0; sel_off = ~off;
      e_rd = 1;   @(negedge clk); e_rd = 0;
      e_int = 1;  @(negedge clk); e_int = 0;
      e = ref_m3(off, tr, rr, ir);
      checks++;
      if (rabs(fx2r(m) - e) > 2e-5 + 1e-6 * rabs(e)) begin
        failures++;
        if (failures < 8) $display("off=%0d T=%f Rg=%f i=%f got %f exp %f", off, tr, rr, ir, fx2r(m), e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
