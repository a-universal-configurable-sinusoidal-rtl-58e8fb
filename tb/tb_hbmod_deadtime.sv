// tb_hbmod_deadtime: checks the dead-time generator of one leg. For several
// dead times D it flips the leg command and counts the clocks in which both
// switches are off before the other switch turns on (expected: D), checks
// which switch turns on, that a command flipping back during the dead time
// restarts it, that both switches are off while the enable is low, and that
// the two switches are never on together.
module tb_hbmod_deadtime;
  localparam int DT_W = 8;
  logic clk = 0, rst_n = 0, en = 0, leg = 0;
  logic [DT_W-1:0] deadtime = 0;
  logic t, t_n;
  int checks = 0, failures = 0;

  hbmod_deadtime #(.DT_W(DT_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  always @(negedge clk) if (rst_n) check(!(t && t_n), "never both on");

  // Flip the command and return the number of both-off clocks seen.
  task automatic flip_and_measure(bit to, int d);
    int off = 0;
    @(negedge clk) leg = to;
    check(to ? t_n : t, "old switch still on in the clock of the change");
    forever begin
      @(posedge clk); #1;
      if (!t && !t_n) off++;
      else break;
      if (off > 300) break;
    end
    check(off == d, $sformatf("dead time %0d measured %0d", d, off));
    check(to ? (t && !t_n) : (t_n && !t), "new switch on after dead time");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Disabled: both off whatever the command.
    repeat (4) begin @(negedge clk) leg = ~leg; #1 check(!t && !t_n, "off while disabled"); end
    @(negedge clk) leg = 1; deadtime = 3;
    @(negedge clk) en = 1;
    @(posedge clk); #1 check(t && !t_n, "turns on without dead time after enable");
    repeat (3) @(posedge clk);
    for (int d = 0; d < 6; d++) begin
      deadtime = DT_W'(d);
      flip_and_measure(0, d);
      repeat (2) @(posedge clk);
      flip_and_measure(1, d);
      repeat (2) @(posedge clk);
    end
    deadtime = 255;
    flip_and_measure(0, 255);
    // Restart: flip back during the dead time.
    deadtime = 10;
    @(negedge clk) leg = 1;
    repeat (4) @(negedge clk);
    check(!t && !t_n, "in dead time");
    leg = 0;
    begin
      int off = 0;
      forever begin
        @(posedge clk); #1;
        if (!t && !t_n) off++; else break;
        if (off > 300) break;
      end
      check(off == 10, $sformatf("restarted dead time, measured %0d", off));
      check(t_n && !t, "back to lower switch");
    end
    @(negedge clk) en = 0;
    @(posedge clk); #1 check(!t && !t_n, "off after enable drops");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
