// tb_hbmod_comparator: checks the signed carrier comparison on corner values
// and random pairs against the integer relation carrier < reference.
module tb_hbmod_comparator;
  localparam int W = 16;
  logic signed [W-1:0] ref_val, count;
  logic pwm;
  int checks = 0, failures = 0;

  hbmod_comparator #(.W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(int r, int c);
    ref_val = W'(r); count = W'(c);
    #1;
    checks++;
    if (pwm !== (c < r)) begin
      failures++;
      $display("FAIL ref=%0d count=%0d pwm=%0b", r, c, pwm);
    end
  endtask

  initial begin
    try(0, 0); try(1, 0); try(0, 1); try(-1, 0); try(0, -1);
    try(-32768, 32767); try(32767, -32768); try(-5, -6); try(-6, -5);
    for (int i = 0; i < 2000; i++)
      try(int'($urandom_range(0, 65535)) - 32768, int'($urandom_range(0, 65535)) - 32768);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
