// tb_hb_modulator: end-to-end test of one H-bridge modulator.
// The expected gate signals are computed from the carrier of the previous
// clock with the published comparison rules: T1 on while carrier < u_m; T2 on
// while carrier < -u_m (normal), while carrier >= -u_m (resonant) or never
// (half bridge); T-bar is the complement. Checked for all four modes, both
// signs of u_m and both polarities with zero dead time; then the both-off
// gaps with a dead time, the safe start (outputs off until a carrier turning
// point with u_m non-zero), the PWM rate of one T1 pulse per 4*Np clocks and
// the bridge voltage pattern (+1/0/-1) of the normal and resonant modes.
module tb_hb_modulator;
  import hbmod_pkg::*;
  logic clk = 0, rst_n = 0, enable = 0, polarity = 0;
  logic signed [CNT_W-1:0] period = 20, um = 0, phase = 0, carrier;
  out_mode_e mode = MODE_NORMAL_FULL;
  logic [DT_W-1:0] deadtime = 0;
  hb_gates_t gates;
  logic sync, en;
  int checks = 0, failures = 0;
  int uv [5] = '{8, -8, 15, 19, 1};

  hb_modulator dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 15) $display("FAIL %s at %0t", msg, $time);
    end
  endtask

  function automatic hb_gates_t expect_gates(int c, int u, out_mode_e m, logic pol);
    hb_gates_t g;
    logic l1, l2;
    l1 = c < u;
    case (m)
      MODE_NORMAL_FULL:   l2 = c < -u;
      MODE_RESONANT_FULL: l2 = !(c < -u);
      default:            l2 = 0;
    endcase
    g = '{t1: l1, t1_n: !l1, t2: l2, t2_n: !l2};
    return pol ? ~g : g;
  endfunction

  // Run n clocks comparing gates with the rule applied to the previous carrier.
  task automatic run_compare(int n);
    int prev;
    @(negedge clk) prev = int'(carrier);
    repeat (n) begin
      @(negedge clk);
      check(gates == expect_gates(prev, int'(um), mode, polarity),
            $sformatf("mode=%0d um=%0d pol=%0b carrier=%0d gates=%b", mode, um, polarity, prev, gates));
      prev = int'(carrier);
    end
  endtask

  initial begin
    int wait_cnt, rises, n_pos, n_neg, n_zero;
    logic last_t1;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // Safe start: Enable with u_m = 0 keeps all gates off.
    @(negedge clk) enable = 1;
    repeat (100) begin @(negedge clk); check(gates == '0 && !en, "gates off before valid u_m"); end
    // Valid u_m written: en follows the next turning point.
    um = 8;
    wait_cnt = 0;
    while (!sync) begin @(negedge clk); check(gates == '0, "off until turning point"); wait_cnt++; end
    check(wait_cnt <= 2 * 20, "turning point within half a period");
    @(negedge clk); check(en, "en one clock after turning point");

    // All modes, both signs, both polarities, no dead time.
    for (int pol = 0; pol < 2; pol++)
      for (int m = 0; m < 4; m++)
        for (int i = 0; i < 5; i++) begin
          @(negedge clk) mode = out_mode_e'(m); um = CNT_W'(uv[i]); polarity = pol[0];
          repeat (2) @(negedge clk);
          run_compare(100);
        end
    polarity = 0;

    // PWM rate: one T1 pulse per carrier period of 4*Np clocks.
    mode = MODE_NORMAL_FULL; um = 10;
    repeat (3) @(negedge clk);
    rises = 0; last_t1 = gates.t1;
    repeat (80 * 10) begin
      @(negedge clk);
      if (gates.t1 && !last_t1) rises++;
      last_t1 = gates.t1;
    end
    check(rises == 10, $sformatf("T1 pulses in 10 periods: %0d", rises));

    // Bridge voltage levels: normal mode with u_m > 0 gives only +1 and 0,
    // resonant mode gives +1, 0 and -1 within one period.
    for (int m = 0; m < 2; m++) begin
      mode = out_mode_e'(m);
      repeat (3) @(negedge clk);
      n_pos = 0; n_neg = 0; n_zero = 0;
      repeat (80) begin
        @(negedge clk);
        case ({gates.t1, gates.t2})
          2'b10: n_pos++;
          2'b01: n_neg++;
          default: n_zero++;
        endcase
      end
      if (m == 0) check(n_pos > 0 && n_neg == 0 && n_zero > 0, "normal mode levels");
      else        check(n_pos > 0 && n_neg > 0 && n_zero > 0, "resonant mode levels");
    end

    // Dead time: every both-off gap of a leg lasts exactly the dead time.
    deadtime = 4; mode = MODE_NORMAL_FULL; um = 5;
    repeat (200) @(negedge clk);
    begin
      int gap1 = 0, gap2 = 0, ngaps = 0;
      repeat (400) begin
        @(negedge clk);
        check(!(gates.t1 && gates.t1_n) && !(gates.t2 && gates.t2_n), "no shoot-through");
        if (!gates.t1 && !gates.t1_n) gap1++;
        else if (gap1 != 0) begin check(gap1 == 4, $sformatf("leg 1 gap %0d", gap1)); gap1 = 0; ngaps++; end
        if (!gates.t2 && !gates.t2_n) gap2++;
        else if (gap2 != 0) begin check(gap2 == 4, $sformatf("leg 2 gap %0d", gap2)); gap2 = 0; ngaps++; end
      end
      check(ngaps >= 10, "dead-time gaps seen");
    end

    // Half-bridge mode: leg 2 stays T2 off, T2-bar on.
    mode = MODE_RESONANT_HALF;
    repeat (10) @(negedge clk);
    repeat (100) begin @(negedge clk); check(!gates.t2 && gates.t2_n, "half bridge leg 2 low"); end

    // Removing Enable turns all gates off.
    @(negedge clk) enable = 0;
    repeat (2) @(negedge clk);
    check(gates == '0 && !en, "off after Enable removed");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
