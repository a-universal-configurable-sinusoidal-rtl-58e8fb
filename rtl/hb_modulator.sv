// hb_modulator: universal sinusoidal modulator for one H-bridge (HB-mod).
//
// A single modulation value u_m controls the whole bridge, since each leg is
// a complementary pair: u_m is compared with a triangular carrier for leg 1
// and -u_m for leg 2. The carrier is a symmetric up-down counter from -Np to
// +Np (f_PWM = f_clk / (4*Np)) that can be phase shifted by Ns for
// phase-shifted PWM. The output mode selects normal (unipolar PWM that
// follows u_m) or resonant operation (both polarities in each carrier
// period, frequency set by Np, pulse width by u_m), each either as a full
// bridge or with leg 2 held low (half bridge, for soft start). Two dead-time
// generators turn the leg commands into the four gate signals, which are
// held off until the safe-start logic enables them, and `polarity` inverts
// all four outputs (1 = active low). `sync` marks the carrier top and
// bottom for synchronizing modulators or the control processor.
//
// Timing: gate outputs follow a comparator change after two clocks plus the
// dead time of the leg that turns on. All settings are sampled every clock;
// they are expected from a register bank.
//
// Structure, widths, modes and the signals at the boundary follow the
// published design; -u_m saturates to +32767 for u_m = -32768 (own choice).
module hb_modulator
  import hbmod_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    enable,
  input  logic signed [CNT_W-1:0] period,
  input  logic signed [CNT_W-1:0] um,
  input  logic signed [CNT_W-1:0] phase,
  input  out_mode_e               mode,
  input  logic                    polarity,
  input  logic [DT_W-1:0]         deadtime,
  output hb_gates_t               gates,
  output logic                    sync,
  output logic                    en,        // safe-start enable, for status
  output logic signed [CNT_W-1:0] carrier    // for observation
);

  localparam logic signed [CNT_W-1:0] MIN_VAL = {1'b1, {(CNT_W-1){1'b0}}};
  localparam logic signed [CNT_W-1:0] MAX_VAL = {1'b0, {(CNT_W-1){1'b1}}};

  logic signed [CNT_W-1:0] um_neg;
  logic cmp1, cmp2, leg1, leg2;
  hb_gates_t g;

  assign um_neg = (um == MIN_VAL) ? MAX_VAL : -um;

  hbmod_carrier #(.W(CNT_W)) u_counter (
    .clk, .rst_n, .enable, .period, .phase,
    .count(carrier), .sync, .at_top(), .at_bottom()
  );

  hbmod_comparator #(.W(CNT_W)) u_cmp1 (.ref_val(um),     .count(carrier), .pwm(cmp1));
  hbmod_comparator #(.W(CNT_W)) u_cmp2 (.ref_val(um_neg), .count(carrier), .pwm(cmp2));

  hbmod_mode_logic u_mode (.mode, .cmp1, .cmp2, .leg1, .leg2);

  hbmod_safe_start #(.W(CNT_W)) u_safe (.clk, .rst_n, .enable, .sync, .um, .en);

  hbmod_deadtime #(.DT_W(DT_W)) u_dt1 (
    .clk, .rst_n, .en, .leg(leg1), .deadtime, .t(g.t1), .t_n(g.t1_n)
  );
  hbmod_deadtime #(.DT_W(DT_W)) u_dt2 (
    .clk, .rst_n, .en, .leg(leg2), .deadtime, .t(g.t2), .t_n(g.t2_n)
  );

  assign gates = polarity ? ~g : g;

endmodule
