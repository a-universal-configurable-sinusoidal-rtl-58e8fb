// hbmod_mode_logic: forms the commands of the two H-bridge legs from the
// two comparator outputs according to the 2-bit output mode.
//
//   mode[0] = 0 normal:    leg 1 = (carrier < u_m), leg 2 = (carrier < -u_m).
//            The bridge voltage is unipolar three-level PWM that follows u_m.
//   mode[0] = 1 resonant:  leg 2 uses the inverted comparison, so the
//            bridge gives +Udc near the carrier bottom, -Udc near the top and
//            zero in between: both polarities in one carrier period, pulse
//            width set by u_m, frequency set by the period input.
//   mode[1] = 1 half bridge: leg 2 is forced to T2 off / T2-bar on
//            (`leg2` low) whatever the comparison says.
//
// The four modes and the half-bridge forcing follow the published design;
// the resonant mode as an inversion of the second comparison is read from
// the published normal- and resonant-mode waveforms. Combinational.
module hbmod_mode_logic
  import hbmod_pkg::*;
(
  input  out_mode_e mode,
  input  logic      cmp1,     // carrier < u_m
  input  logic      cmp2,     // carrier < -u_m
  output logic      leg1,     // 1 = upper switch of leg 1 on
  output logic      leg2      // 1 = upper switch of leg 2 on
);

  logic resonant, half;

  always_comb begin
    resonant = mode[0];
    half     = mode[1];
    leg1     = cmp1;
    if (half)          leg2 = 1'b0;
    else if (resonant) leg2 = ~cmp2;
    else               leg2 = cmp2;
  end

endmodule
