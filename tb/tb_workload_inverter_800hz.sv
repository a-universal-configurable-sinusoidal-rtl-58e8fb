// tb_workload_inverter_800hz: one H-bridge inverter modulated with a 208 Hz
// sine on an 800 Hz carrier, at a realistic carrier size.
//
// With an assumed 50 MHz clock, Np = 50e6 / (4 * 800) = 15625. The test
// plays the control processor: at every carrier turning point (sync) it
// writes the next sample u_m = 0.8 * Np * sin(2*pi*208 Hz*t), in normal
// mode. It runs five 208 Hz periods (about 1.2 million clocks), once
// without and once with dead time.
//
// Check: in unipolar PWM the mean of (T1 - T2) over the half carrier period
// between two turning points equals u_m / Np. Summed over 2*Np clocks that
// is 2*u_m, to within two clocks of edge quantization. The same must hold
// with a 1 us dead time (50 clocks), to within the dead time. Also checked:
// the turning points come every 2*Np clocks, and the output polarity
// follows the sign of the sine (both half waves occur).
module tb_workload_inverter_800hz;
  import hbmod_pkg::*;
  localparam int    NP    = 15625;
  localparam real   F_CLK = 50.0e6;
  localparam real   F_SIN = 208.0;
  localparam int    N_PER = 5;
  logic clk = 0, rst_n = 0, enable = 0, polarity = 0;
  logic signed [CNT_W-1:0] period = CNT_W'(NP), um = 0, phase = 0, carrier;
  out_mode_e mode = MODE_NORMAL_FULL;
  logic [DT_W-1:0] deadtime = 0;
  hb_gates_t gates;
  logic sync, en;
  int checks = 0, failures = 0;

  hb_modulator dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2600000) @(posedge clk);
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

  // Run N_PER sine periods; tol is the allowed error of each half-period sum.
  task automatic run_sine(int tol, output int n_pos, output int n_neg);
    longint t = 0, last_sync = -1;
    int acc = 0, um_seg = 0, n_seg = 0;
    bit seg_on = 0;
    n_pos = 0; n_neg = 0;
    while (t < longint'(N_PER * F_CLK / F_SIN)) begin
      @(negedge clk);
      t++;
      acc += int'(gates.t1) - int'(gates.t2);
      if (sync) begin
        // The half period that just ended used um_seg throughout.
        if (seg_on) begin
          check(t - last_sync == 2*NP, $sformatf("half period %0d clocks", t - last_sync));
          check(acc - 2*um_seg <= tol && 2*um_seg - acc <= tol,
                $sformatf("mean voltage: sum %0d expected %0d", acc, 2*um_seg));
          if (um_seg > NP/4)  n_pos++;
          if (um_seg < -NP/4) n_neg++;
          n_seg++;
        end
        // Next sample, taking effect from the next clock edge on.
        um = CNT_W'($rtoi(0.8 * NP * $sin(2.0 * 3.14159265358979 * F_SIN * real'(t) / F_CLK)));
        if (um == 0) um = 1;
        um_seg = int'(um);
        last_sync = t;
        seg_on = en;
        acc = 0;
      end
    end
  endtask

  initial begin
    int p, n;
    repeat (3) @(posedge clk);
    rst_n = 1;
    um = 1;
    @(negedge clk) enable = 1;
    run_sine(2, p, n);
    check(p >= 5 && n >= 5, $sformatf("both half waves: %0d positive, %0d negative segments", p, n));
    deadtime = 50;
    run_sine(2 * 50 + 2, p, n);
    check(p >= 5 && n >= 5, "both half waves with dead time");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
