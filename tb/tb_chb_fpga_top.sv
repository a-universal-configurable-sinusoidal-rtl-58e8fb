// tb_chb_fpga_top: end-to-end test of the seven-level CHB active-front-end
// control design at its default size (three front-end and three inverter
// modulators), driven over the register bus the way the control processor
// would drive it.
//
// Set-up: all carriers get Np = 40; the front-end cells r1..r3 run normal
// mode with carriers shifted by Ns = -27, 0, +27 (about -60, 0, +60 degrees)
// for phase-shifted PWM; inverter i1 runs resonant mode, i2 normal
// half-bridge mode with inverted polarity, i3 resonant half-bridge mode and
// starts with u_m = 0 so that its safe start is held back. The interrupt,
// from modulator r1's sync pulses, paces a loop that writes a sampled sine
// to the three front-end u_m registers.
//
// Checks, for every modulator and every clock: the gate signals against the
// comparison rules applied to a closed-form triangular carrier (counted
// from the clock at which Enable was written), the safe-start enable against
// its rule, and the interrupt spacing of half a carrier period. The series
// voltage of the front end must take all seven levels. Later phases check the
// dead time, a period change in resonant mode (pulse-frequency modulation)
// and the switch-off when Enable is cleared. Every mechanism must occur.
module tb_chb_fpga_top;
  import hbmod_pkg::*;
  localparam int N = 6, NP = 40;
  logic clk = 0, rst_n = 0, cs = 0, we = 0;
  logic [4:0] addr = 0;
  logic [15:0] wdata = 0, rdata;
  logic irq;
  hb_gates_t pwm_r [3], pwm_i [3];
  logic [2:0] en_r, en_i;
  int checks = 0, failures = 0;

  chb_fpga_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  // Shadow of the register bank, updated at the clock edge of each write.
  int s_np [N], s_um [N], s_ns [N], s_mode [N], s_pol [N], s_dt [N];
  bit s_enable = 0;
  longint cyc = 0, e_cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic wr(int a, int d);
    @(negedge clk) cs = 1; we = 1; addr = 5'(a); wdata = 16'(d);
    @(posedge clk);
    #1 cs = 0; we = 0;
    if (a < 24) begin
      case (a % 4)
        0: s_np[a/4] = int'($signed(16'(d)));
        1: s_um[a/4] = int'($signed(16'(d)));
        2: s_ns[a/4] = int'($signed(16'(d)));
        default: begin s_mode[a/4] = d & 3; s_pol[a/4] = (d >> 2) & 1; s_dt[a/4] = (d >> 8) & 255; end
      endcase
    end else if (a == 24) begin
      s_enable = d[0];
      e_cyc = cyc;   // clocks counted from the edge that wrote Enable
    end
  endtask

  function automatic int tri_wave(longint p, int np);
    longint q = p % (4*np);
    if (q < 0) q += 4*np;
    return int'((q <= 2*np) ? q - np : 3*np - q);
  endfunction

  function automatic hb_gates_t rule(int c, int u, int m, int pol, bit on);
    hb_gates_t g;
    logic l1, l2;
    l1 = c < u;
    case (m)
      0: l2 = c < -u;
      1: l2 = !(c < -u);
      default: l2 = 0;
    endcase
    g = on ? '{t1: l1, t1_n: !l1, t2: l2, t2_n: !l2} : '0;
    return pol ? ~g : g;
  endfunction

  function automatic hb_gates_t gates_of(int k);
    return (k < 3) ? pwm_r[k] : pwm_i[k-3];
  endfunction
  function automatic logic en_of(int k);
    return (k < 3) ? en_r[k] : en_i[k-3];
  endfunction

  // Mechanism counters.
  int n_safe_hold, n_safe_start, n_phase, n_normal, n_resonant, n_half, n_polarity;
  int n_irq, n_deadtime, n_pfm, n_disable, n_levels;
  bit checker_on = 0;
  bit lvl_seen [7];

  // Per-clock model of every modulator.
  hb_gates_t exp_g [N];
  logic      exp_en [N];
  bit        have_exp = 0;
  always @(negedge clk) begin
    if (checker_on) begin
      if (have_exp)
        for (int k = 0; k < N; k++) begin
          check(gates_of(k) == exp_g[k], $sformatf("gates of modulator %0d: %b, expected %b", k, gates_of(k), exp_g[k]));
          check(en_of(k) == exp_en[k], $sformatf("safe-start enable of modulator %0d", k));
          if (exp_en[k]) begin
            case (s_mode[k]) 0: n_normal++; 1: n_resonant++; default: n_half++; endcase
            if (s_pol[k] != 0) n_polarity++;
            if (s_ns[k] != 0) n_phase++;
          end
        end
      for (int k = 0; k < N; k++) begin
        int c;
        bit sync_now;
        c = tri_wave(longint'(s_ns[k] + s_np[k]) + (cyc - e_cyc), s_np[k]);
        sync_now = (c == s_np[k]) || (c == -s_np[k]);
        exp_g[k]  = rule(c, s_um[k], s_mode[k], s_pol[k], en_of(k));
        exp_en[k] = s_enable && (en_of(k) || (sync_now && s_um[k] != 0));
        if (s_enable && !en_of(k) && sync_now && s_um[k] == 0) n_safe_hold++;
        if (!en_of(k) && exp_en[k]) n_safe_start++;
      end
      have_exp = 1;
      begin
        int v = 0;
        for (int k = 0; k < 3; k++) v += int'(pwm_r[k].t1) - int'(pwm_r[k].t2);
        lvl_seen[v + 3] = 1;
      end
    end else begin
      have_exp = 0;
    end
  end

  // Interrupt spacing: half a carrier period of modulator r1.
  longint last_irq = -1;
  logic irq_q = 0;
  always @(posedge clk) begin
    irq_q <= irq;
    if (irq && !irq_q && checker_on) begin
      if (last_irq >= 0) check(cyc - last_irq == 2*NP, $sformatf("irq spacing %0d", cyc - last_irq));
      last_irq = cyc;
      n_irq++;
    end
  end

  initial begin
    int rd_v;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Configure: period, phase, control word of every modulator.
    for (int k = 0; k < N; k++) begin
      int ns_v, ctrl;
      ns_v = (k == 0) ? -27 : (k == 2) ? 27 : 0;
      case (k)
        3: ctrl = 1;            // resonant, full bridge
        4: ctrl = 2 | 4;        // normal, half bridge, inverted polarity
        5: ctrl = 3;            // resonant, half bridge
        default: ctrl = 0;      // normal, full bridge
      endcase
      wr(4*k + 0, NP);
      wr(4*k + 2, ns_v);
      wr(4*k + 3, ctrl);
      wr(4*k + 1, (k < 3) ? 0 : (k == 5) ? 0 : 15);
    end
    wr(25, 1);                  // interrupt from modulator r1
    // Start all carriers together.
    @(negedge clk) checker_on = 1;
    wr(24, 1);
    // Control loop: a new sine sample for the front end at every interrupt.
    for (int n = 0; n < 120; n++) begin
      int u;
      @(posedge irq);
      u = int'($rtoi(0.9 * NP * $sin(2.0 * 3.14159265358979 * n / 40.0)));
      if (u == 0) u = 1;
      for (int k = 0; k < 3; k++) wr(4*k + 1, u);
      if (n == 20) wr(4*5 + 1, 12);   // valid data for i3 arrives late
    end
    // Read back one register over the bus.
    @(negedge clk) cs = 1; we = 0; addr = 5'(4*3 + 0);
    @(negedge clk) cs = 0; rd_v = int'(rdata);
    check(rd_v == NP, "read back period");
    checker_on = 0;

    // Dead time on r1: gaps of exactly 6 clocks in both legs.
    wr(4*0 + 3, 6 << 8);
    repeat (20) @(negedge clk);
    begin
      int gap;
      gap = 0;
      repeat (800) begin
        @(negedge clk);
        check(!(pwm_r[0].t1 && pwm_r[0].t1_n), "no shoot-through");
        if (!pwm_r[0].t1 && !pwm_r[0].t1_n) gap++;
        else if (gap != 0) begin check(gap == 6, $sformatf("dead time gap %0d", gap)); gap = 0; n_deadtime++; end
      end
    end

    // Pulse-frequency modulation: i1 in resonant mode with Np 40 -> 20.
    for (int pass = 0; pass < 2; pass++) begin
      int rises, want;
      logic last;
      rises = 0;
      want = (pass == 0) ? 5 : 10;   // T1 pulses in 800 clocks, one per 4*Np
      if (pass == 1) begin wr(4*3 + 0, 20); wr(4*3 + 1, 8); end
      repeat (200) @(negedge clk);
      last = pwm_i[0].t1;
      repeat (800) begin
        @(negedge clk);
        if (pwm_i[0].t1 && !last) rises++;
        last = pwm_i[0].t1;
      end
      check(rises == want, $sformatf("resonant pulses at Np=%0d: %0d", pass ? 20 : 40, rises));
      if (pass == 1 && rises == want) n_pfm++;
    end

    // Clearing Enable switches every gate off (inactive level per polarity).
    wr(24, 0);
    repeat (3) @(negedge clk);
    for (int k = 0; k < N; k++) begin
      check(gates_of(k) == ((s_pol[k] != 0) ? 4'b1111 : 4'b0000) && !en_of(k), $sformatf("off after disable %0d", k));
      n_disable++;
    end

    n_levels = 0;
    foreach (lvl_seen[i]) if (lvl_seen[i]) n_levels++;
    check(n_levels == 7, $sformatf("front-end voltage levels seen: %0d", n_levels));

    $display("mechanisms: safe_hold=%0d safe_start=%0d phase_shift=%0d normal=%0d resonant=%0d half=%0d polarity=%0d irq=%0d deadtime=%0d pfm=%0d disable=%0d levels=%0d",
             n_safe_hold, n_safe_start, n_phase, n_normal, n_resonant, n_half, n_polarity, n_irq, n_deadtime, n_pfm, n_disable, n_levels);
    check(n_safe_hold > 0, "safe-start hold seen");
    check(n_safe_start >= 6, "every modulator started");
    check(n_phase > 0, "phase-shifted carriers");
    check(n_normal > 0, "normal mode");
    check(n_resonant > 0, "resonant mode");
    check(n_half > 0, "half-bridge mode");
    check(n_polarity > 0, "inverted polarity");
    check(n_irq > 100, "interrupts");
    check(n_deadtime > 0, "dead time");
    check(n_pfm > 0, "period change");
    check(n_disable > 0, "disable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
