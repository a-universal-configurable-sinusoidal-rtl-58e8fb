// tb_hbmod_carrier: self-checking test of the triangular carrier counter.
// For several half periods Np and phase shifts Ns the count after Enable is
// compared with the closed-form triangle tri(p) (p = Ns + Np + k, taken
// modulo 4*Np: rising from -Np for 2*Np steps, then falling), and the sync
// pulses with the turning points. Also checks the hold at Ns while disabled
// and that the period is exactly 4*Np clocks.
module tb_hbmod_carrier;
  localparam int W = 16;
  logic clk = 0, rst_n = 0, enable = 0;
  logic signed [W-1:0] period, phase, count;
  logic sync, at_top, at_bottom;
  int checks = 0, failures = 0;

  hbmod_carrier #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int tri_wave(int p, int np);
    int q = p % (4*np);
    if (q < 0) q += 4*np;
    return (q <= 2*np) ? q - np : 3*np - q;
  endfunction

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", msg, $time);
    end
  endtask

  task automatic run(int np, int ns, int cycles);
    int last_sync, nsync;
    enable = 0; period = W'(np); phase = W'(ns);
    repeat (3) @(posedge clk);
    #1 check(count == W'(ns), "hold at Ns");
    check(!sync, "no sync while disabled");
    @(negedge clk) enable = 1;
    last_sync = -1; nsync = 0;
    for (int k = 0; k < cycles; k++) begin
      @(negedge clk);
      check(int'(count) == tri_wave(ns + np + k + 1, np), $sformatf("count np=%0d ns=%0d k=%0d got %0d", np, ns, k, count));
      check(sync == (tri_wave(ns + np + k + 1, np) == np || tri_wave(ns + np + k + 1, np) == -np), "sync");
      if (sync) begin
        if (last_sync >= 0) check(k - last_sync == 2*np, "half period between syncs");
        last_sync = k; nsync++;
      end
    end
    check(nsync >= cycles / (2*np) - 1, "enough sync pulses");
    enable = 0;
  endtask

  initial begin
    period = 5; phase = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(5, 0, 60);
    run(5, 3, 60);
    run(5, -5, 60);
    run(5, 5, 60);
    run(7, -2, 100);
    run(1, 0, 20);
    run(300, 150, 3000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
