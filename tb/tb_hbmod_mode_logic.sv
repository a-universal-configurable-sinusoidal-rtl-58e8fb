// tb_hbmod_mode_logic: exhaustive check of the leg commands for all four
// output modes and all comparator combinations, against the mode table:
// leg 1 follows u_m; leg 2 follows -u_m (normal), its inverse (resonant) or
// is held low (half bridge).
module tb_hbmod_mode_logic;
  import hbmod_pkg::*;
  out_mode_e mode;
  logic cmp1, cmp2, leg1, leg2;
  int checks = 0, failures = 0;

  hbmod_mode_logic dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic e1, e2;
    for (int m = 0; m < 4; m++)
      for (int c = 0; c < 4; c++) begin
        mode = out_mode_e'(m); cmp1 = c[0]; cmp2 = c[1];
        #1;
        e1 = c[0];
        case (m)
          0: e2 = c[1];
          1: e2 = !c[1];
          default: e2 = 0;
        endcase
        checks++;
        if (leg1 !== e1 || leg2 !== e2) begin
          failures++;
          $display("FAIL mode=%0d cmp=%0b%0b legs=%0b%0b", m, cmp1, cmp2, leg1, leg2);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
