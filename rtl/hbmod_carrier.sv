// hbmod_carrier: symmetric up-down counter that produces the triangular PWM
// carrier of one H-bridge modulator.
//
// The counter runs by one count per clock between -Np and +Np, so one
// carrier period takes 4*Np clocks and Np = f_clk / (4 * f_PWM). While
// `enable` is low the counter is held at the phase shift Ns and set to count
// up; when `enable` rises it starts from Ns. Ns in [-Np, +Np] therefore
// shifts the carrier by -90..+90 degrees (Ns = phi/90 * Np), which gives
// phase-shifted PWM across modulators that share one Enable.
//
// Direction reverses when the count reaches (or exceeds, if Np was lowered
// while running) +Np or -Np, so the period input may be changed at any time
// for pulse-frequency modulation. `sync` is high for the one clock in which
// the enabled carrier sits at its top or bottom; `at_top`/`at_bottom` tell
// which. Outputs are decoded from registers; there is no combinational path
// from the inputs except through `enable` gating of `sync`.
//
// The counter and its width, the range -Np..+Np, the phase shift and the
// synchronization pulse follow the published design. Holding the count at
// Ns while disabled, the starting direction (up) and the ">=" reversal test
// are this design's own choices. Np is expected in 1..2^(W-1)-1.
module hbmod_carrier #(
  parameter int unsigned W = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                enable,
  input  logic signed [W-1:0] period,    // Np
  input  logic signed [W-1:0] phase,     // Ns
  output logic signed [W-1:0] count,
  output logic                sync,
  output logic                at_top,
  output logic                at_bottom
);

  logic up;

  assign at_top    = (count >= period);
  assign at_bottom = (count <= -period);
  assign sync      = enable & (at_top | at_bottom);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      up    <= 1'b1;
    end else if (!enable) begin
      count <= phase;
      up    <= 1'b1;
    end else if (up) begin
      if (at_top) begin
        up    <= 1'b0;
        count <= count - 1'b1;
      end else begin
        count <= count + 1'b1;
      end
    end else begin
      if (at_bottom) begin
        up    <= 1'b1;
        count <= count + 1'b1;
      end else begin
        count <= count - 1'b1;
      end
    end
  end

endmodule
