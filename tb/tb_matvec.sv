// tb_matvec - random 7x10 and 4x5 products (coefficients within +-2,
// vector entries within +-1000) are compared with a double-precision
// dot product; the result must agree within one data LSB.
module tb_matvec;
  import ets_pkg::*;
  import ets_tb_pkg::*;

  coef_t m4 [4][5];
  fx_t   v5 [5], y4 [4];
  coef_t m7 [7][10];
  fx_t   v10 [10], y7 [7];
  int checks = 0, failures = 0;

  matvec #(.ROWS(4), .COLS(5))  dut4 (.m(m4), .v(v5),  .y(y4));
  matvec #(.ROWS(7), .COLS(10)) dut7 (.m(m7), .v(v10), .y(y7));

  function automatic real rnd(real span);
    return span * (real'($urandom_range(2000000)) / 1000000.0 - 1.0);
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real mr4 [4][5], vr5 [5], mr7 [7][10], vr10 [10];
    for (int n = 0; n < 300; n++) begin
      for (int c = 0; c < 5; c++) begin vr5[c] = rnd(1000.0); v5[c] = to_fx(vr5[c]); vr5[c] = fx2r(v5[c]); end
      for (int r = 0; r < 4; r++) for (int c = 0; c < 5; c++) begin
        m4[r][c] = to_coef(rnd(2.0)); mr4[r][c] = real'(longint'(m4[r][c])) / (2.0 ** CFRAC);
      end
      for (int c = 0; c < 10; c++) begin vr10[c] = rnd(1000.0); v10[c] = to_fx(vr10[c]); vr10[c] = fx2r(v10[c]); end
      for (int r = 0; r < 7; r++) for (int c = 0; c < 10; c++) begin
        m7[r][c] = to_coef(rnd(2.0)); mr7[r][c] = real'(longint'(m7[r][c])) / (2.0 ** CFRAC);
      end
      #10;
      for (int r = 0; r < 4; r++) begin
        real e;
        e = 0.0;
        for (int c = 0; c < 5; c++) e += mr4[r][c] * vr5[c];
        checks++;
        if (rabs(fx2r(y4[r]) - e) > 1.5 / (2.0 ** DFRAC)) failures++;
      end
      for (int r = 0; r < 7; r++) begin
        real e;
        e = 0.0;
        for (int c = 0; c < 10; c++) e += mr7[r][c] * vr10[c];
        checks++;
        if (rabs(fx2r(y7[r]) - e) > 1.5 / (2.0 ** DFRAC)) begin
          failures++;
          if (failures < 5) $display("row %0d got %f exp %f", r, fx2r(y7[r]), e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
