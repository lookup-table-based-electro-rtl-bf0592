// tb_coef_a_lut - loads random words into all 9 x 20 coefficient slots
// (interleaved with writes addressed to other targets, which must be
// ignored), then reads each case back and checks all 20 entries, the
// one-cycle read latency and that the output holds while rd_en is low.
module tb_coef_a_lut;
  import ets_pkg::*;

  logic clk = 0;
  cfg_wr_t wr;
  logic rd_en = 0;
  logic [3:0] case_idx = 0;
  coef_t a [4][5];
  coef_t ref_m [180];
  int checks = 0, failures = 0;

  coef_a_lut dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr = '0;
    @(negedge clk);
    for (int k = 0; k < 180; k++) begin
      ref_m[k] = coef_t'({$urandom, $urandom});
      wr = '{we: 1'b1, tgt: CFG_A, pm: 1'b0, addr: AW'(k), data: ref_m[k]};
      @(negedge clk);
      wr = '{we: 1'b1, tgt: CFG_TH, pm: 1'b0, addr: AW'(k), data: ~ref_m[k]};
      @(negedge clk);
    end
    wr = '0;
    for (int pass = 0; pass < 2; pass++)
      for (int cs = 0; cs < 9; cs++) begin
        case_idx = 4'(pass ? 8 - cs : cs);
        rd_en = 1;
        @(negedge clk);
        rd_en = 0;
        case_idx = 4'(($urandom_range(8)));
        for (int r = 0; r < 4; r++)
          for (int c = 0; c < 5; c++) begin
            checks++;
            if (a[r][c] !== ref_m[(pass ? 8 - cs : cs) * 20 + r * 5 + c]) failures++;
          end
        @(negedge clk);
        checks++;
        if (a[3][4] !== ref_m[(pass ? 8 - cs : cs) * 20 + 19]) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
