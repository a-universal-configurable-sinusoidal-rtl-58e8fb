// hbmod_comparator: signed comparison of a modulation value with the carrier.
//
// `pwm` is high while the carrier is below the reference, i.e. the upper
// switch of the leg is commanded on while count < ref. This orientation is
// the one the normal-mode waveforms show: the upper switch turns off around
// the carrier peak when u_m is positive. Purely combinational, no latency.
// Two instances per modulator compare u_m and -u_m with the same carrier.
module hbmod_comparator #(
  parameter int unsigned W = 16
) (
  input  logic signed [W-1:0] ref_val,
  input  logic signed [W-1:0] count,
  output logic                pwm
);

  assign pwm = (count < ref_val);

endmodule
