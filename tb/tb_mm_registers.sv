// tb_mm_registers: writes random values to every register of the bank over
// the bus, then checks the configuration outputs field by field and reads
// every word back. Also checks reset values and that unused addresses read 0.
module tb_mm_registers;
  import hbmod_pkg::*;
  localparam int N = 6, AW = 5;
  logic clk = 0, rst_n = 0, cs = 0, we = 0;
  logic [AW-1:0] addr = 0;
  logic [15:0] wdata = 0, rdata;
  hbmod_cfg_t cfg [N];
  logic enable;
  logic [N-1:0] sync_mask;
  int checks = 0, failures = 0;
  logic [15:0] shadow [32];

  mm_registers #(.N_MOD(N), .ADDR_W(AW)) dut (.*);

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

  task automatic wr(int a, logic [15:0] d);
    @(negedge clk) cs = 1; we = 1; addr = AW'(a); wdata = d;
    @(negedge clk) cs = 0; we = 0;
  endtask

  task automatic rd(int a, output logic [15:0] d);
    @(negedge clk) cs = 1; we = 0; addr = AW'(a);
    @(negedge clk) cs = 0; d = rdata;
  endtask

  initial begin
    logic [15:0] d, exp;
    repeat (2) @(posedge clk);
    rst_n = 1;
    check(!enable && sync_mask == 1, "reset values");
    for (int a = 0; a < 32; a++) begin
      shadow[a] = 16'($urandom);
      wr(a, shadow[a]);
    end
    for (int k = 0; k < N; k++) begin
      check(cfg[k].period == shadow[4*k],   "period");
      check(cfg[k].um     == shadow[4*k+1], "um");
      check(cfg[k].phase  == shadow[4*k+2], "phase");
      check(cfg[k].mode == shadow[4*k+3][1:0] && cfg[k].polarity == shadow[4*k+3][2]
            && cfg[k].deadtime == shadow[4*k+3][15:8], "ctrl fields");
    end
    check(enable == shadow[24][0], "enable");
    check(sync_mask == shadow[25][5:0], "sync mask");
    for (int a = 0; a < 32; a++) begin
      rd(a, d);
      if (a < 24 && a % 4 == 3) exp = shadow[a] & 16'hff07;
      else if (a < 24) exp = shadow[a];
      else if (a == 24) exp = 16'(shadow[a][0]);
      else if (a == 25) exp = 16'(shadow[a][5:0]);
      else exp = 0;
      check(d == exp, $sformatf("read a=%0d got %h exp %h", a, d, exp));
    end
    wr(24, 16'h0001); check(enable, "enable set");
    wr(24, 16'h0000); check(!enable, "enable clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
