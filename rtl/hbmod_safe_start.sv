// hbmod_safe_start: output enable of one modulator for a safe start-up.
//
// After the common Enable is asserted the carriers of all modulators start,
// but the gate outputs stay off until two conditions hold: the carrier has
// reached its top or bottom, and u_m holds valid data, i.e. is non-zero.
// The enable `en` is set at a carrier turning point (`sync`) at which u_m is
// non-zero, so the outputs always start at a clean point of the carrier, and
// it stays set until Enable is removed. `en` is registered: it rises one
// clock after the qualifying turning point.
//
// The two conditions are the published ones. Requiring them in the same
// clock (rather than remembering an earlier turning point) and clearing
// `en` only when Enable falls are this design's own choices.
module hbmod_safe_start #(
  parameter int unsigned W = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                enable,   // common Enable of the modulators
  input  logic                sync,     // carrier at top or bottom
  input  logic signed [W-1:0] um,
  output logic                en
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                         en <= 1'b0;
    else if (!enable)                   en <= 1'b0;
    else if (sync && (um != '0))        en <= 1'b1;
  end

endmodule
