// tb_hbmod_safe_start: checks that the output enable waits for both a
// carrier turning point and a non-zero u_m, rises one clock after the
// turning point at which both hold, stays set and clears with Enable.
module tb_hbmod_safe_start;
  localparam int W = 16;
  logic clk = 0, rst_n = 0, enable = 0, sync = 0;
  logic signed [W-1:0] um = 0;
  logic en;
  int checks = 0, failures = 0;

  hbmod_safe_start #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  task automatic step(bit s, int u);
    @(negedge clk); sync = s; um = W'(u);
    @(posedge clk); #1; sync = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Turning point and data, but no Enable.
    step(1, 100); check(!en, "no en without Enable");
    @(negedge clk) enable = 1;
    // Enable, data valid, no turning point.
    repeat (5) begin step(0, 100); check(!en, "no en before turning point"); end
    // Turning point with u_m = 0.
    step(1, 0); check(!en, "no en with zero u_m");
    step(0, 0); check(!en, "still off");
    // Turning point with valid data.
    step(1, -7); check(en, "en one clock after turning point with data");
    // Stays on whatever follows.
    repeat (5) begin step(0, 0); check(en, "en stays"); end
    step(1, 0); check(en, "en stays at zero u_m");
    @(negedge clk) enable = 0;
    @(posedge clk); #1 check(!en, "en cleared with Enable");
    @(negedge clk) enable = 1;
    step(0, 5); check(!en, "needs a new turning point");
    step(1, 5); check(en, "re-enabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
