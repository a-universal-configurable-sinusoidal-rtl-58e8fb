// hbmod_deadtime: dead-time generator with output multiplexer for one leg
// (one complementary switch pair T / T-bar) of an H-bridge.
//
// `leg` is the commanded state of the leg (1 = T on, 0 = T-bar on). The
// generator keeps the state it applies in `cur`. When the command changes,
// `cur` follows one clock later and both switches are held off for
// `deadtime` clocks before the newly selected switch turns on; a deadtime of
// 0 gives a plain complementary pair. A command that changes back during the
// dead time restarts it. The multiplexer drives both switches off while the
// safe-start enable `en` is low; the leg state is then tracked without dead
// time, since both switches are already off. Outputs are active high here;
// the polarity is applied in the modulator. Gate outputs are decoded from
// registers only.
//
// A user-set 8-bit dead time applied to both pairs is the published part;
// the counting scheme and the one-clock latency are this design's own.
module hbmod_deadtime #(
  parameter int unsigned DT_W = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  input  logic            leg,
  input  logic [DT_W-1:0] deadtime,
  output logic            t,
  output logic            t_n
);

  logic            cur;
  logic            en_q;
  logic [DT_W-1:0] dt_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur    <= 1'b0;
      en_q   <= 1'b0;
      dt_cnt <= '0;
    end else begin
      en_q <= en;
      if (!en) begin
        cur    <= leg;
        dt_cnt <= '0;
      end else if (leg != cur) begin
        cur    <= leg;
        dt_cnt <= deadtime;
      end else if (dt_cnt != '0) begin
        dt_cnt <= dt_cnt - 1'b1;
      end
    end
  end

  assign t   = en_q & (dt_cnt == '0) &  cur;
  assign t_n = en_q & (dt_cnt == '0) & ~cur;

  // The two switches of a pair are never on together.
  a_no_shoot_through: assert property (@(posedge clk) disable iff (!rst_n) !(t && t_n));

endmodule
