// sync_manager: combines the synchronization pulses of N_MOD modulators into
// one interrupt request for the control processor.
//
// Each modulator pulses `sync` for one clock at the top and the bottom of
// its carrier. The pulses of the modulators selected by `mask` are ORed;
// any selected pulse starts an interrupt pulse `irq` of IRQ_LEN clocks,
// one clock later, long enough for a processor that samples the line with
// its own clock. A pulse that arrives while `irq` is high restarts it.
//
// Combining the pulses into one interrupt is the published function; the
// mask, the OR and the pulse length are this design's own choices.
module sync_manager #(
  parameter int unsigned N_MOD   = 6,
  parameter int unsigned IRQ_LEN = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N_MOD-1:0] sync,
  input  logic [N_MOD-1:0] mask,
  output logic             irq
);

  localparam int unsigned CW = $clog2(IRQ_LEN + 1);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 cnt <= '0;
    else if ((sync & mask) != '0) cnt <= CW'(IRQ_LEN);
    else if (cnt != '0)         cnt <= cnt - 1'b1;
  end

  assign irq = (cnt != '0);

endmodule
