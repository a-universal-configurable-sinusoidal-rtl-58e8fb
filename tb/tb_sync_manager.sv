// tb_sync_manager: checks that masked synchronization pulses raise an
// interrupt of IRQ_LEN clocks one clock later, that unmasked pulses are
// ignored and that a pulse during the interrupt restarts it.
module tb_sync_manager;
  localparam int N = 6, L = 4;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] sync = 0, mask = 0;
  logic irq;
  int checks = 0, failures = 0;

  sync_manager #(.N_MOD(N), .IRQ_LEN(L)) dut (.*);

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

  // Pulse `s` for one clock; return the length of the irq pulse that follows.
  task automatic pulse(logic [N-1:0] s, output int len);
    @(negedge clk) sync = s;
    check(!irq, "irq idle before pulse");
    @(negedge clk) sync = 0;
    len = 0;
    while (irq && len < 100) begin len++; @(negedge clk); end
  endtask

  initial begin
    int len;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      logic [N-1:0] s;
      mask = N'($urandom); s = N'($urandom);
      if (i % 3 == 0) s = 0;
      pulse(s, len);
      check(len == (((s & mask) != 0) ? L : 0), $sformatf("mask=%b sync=%b len=%0d", mask, s, len));
      repeat (2) @(negedge clk);
    end
    // Restart while active.
    mask = '1;
    @(negedge clk) sync = 1;
    @(negedge clk) sync = 0;
    @(negedge clk) sync = 2;
    @(negedge clk) sync = 0;
    len = 0;
    while (irq && len < 100) begin len++; @(negedge clk); end
    check(len == L, $sformatf("restarted irq len %0d", len));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
