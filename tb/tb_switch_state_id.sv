// tb_switch_state_id - random gate signals and inductor currents (with many
// exact zeros) are applied; after each enable the registered states and
// the case index are compared with the commutation rules, and the state must
// hold while en is low. Every reachable case must be visited; case 5 (D1 on
// while S2 and D2 are off) cannot occur, because D2 conducts whenever iL1 > 0.
module tb_switch_state_id;
  import ets_pkg::*;

  logic clk = 0, rst = 1, en = 0;
  logic [1:0] u;
  fx_t il1, il2;
  sw_state_t m1, m2;
  logic [3:0] case_idx;
  int checks = 0, failures = 0;
  int seen [9];

  switch_state_id dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fx_t rnd_i();
    case ($urandom_range(3))
      0: return '0;
      1: return fx_t'(1);
      2: return -fx_t'($urandom_range(1000000));
      default: return fx_t'($urandom_range(1000000));
    endcase
  endfunction

  initial begin
    sw_state_t e1, e2;
    u = 0; il1 = 0; il2 = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    @(negedge clk);
    checks++;
    if (m1 != SW_OFF || m2 != SW_OFF || case_idx != 4'd8) failures++;
    for (int n = 0; n < 2000; n++) begin
      u = 2'($urandom_range(3));
      il1 = rnd_i();
      il2 = rnd_i();
      en = 1;
      @(negedge clk);
      en = 0;
      e1 = u[0] ? SW_S_ON : (il1 > 0 ? SW_D_ON : SW_OFF);
      e2 = u[1] ? SW_S_ON : ((il2 > 0 || il1 > 0) ? SW_D_ON : SW_OFF);
      checks++;
      if (m1 != e1 || m2 != e2 || int'(case_idx) != 3 * int'(e1) + int'(e2)) begin
        failures++;
        if (failures < 10) $display("mismatch u=%b il1=%0d il2=%0d got %0d %0d %0d", u, il1, il2, m1, m2, case_idx);
      end
      seen[case_idx]++;
      // hold while disabled
      u = ~u; il1 = -il1; il2 = -il2;
      @(negedge clk);
      checks++;
      if (m1 != e1 || m2 != e2) failures++;
    end
    for (int k = 0; k < 9; k++) begin
      checks++;
      if (k != 5 && seen[k] == 0) begin failures++; $display("case %0d never seen", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
