// chb_fpga_top: FPGA control design of a single-phase seven-level cascaded
// H-bridge (CHB) active front end with three separate inverters.
//
// Six identical H-bridge modulators drive the six bridges of the converter:
// modulators 0..2 the active-front-end bridges r1..r3, whose series outputs
// form the seven-level phase voltage, and modulators 3..5 the inverter
// bridges i1..i3, one behind each dc link. The control processor writes the
// period, modulation value, phase shift and control word of every modulator
// and the common Enable through the register bank (see mm_registers for the
// map and bus timing). The synchronization pulses of all modulators go to the
// sync manager, whose interrupt paces the processor's control loop.
//
// Ports: the processor bus (`cs`, `we`, `addr`, `wdata`, `rdata`), the
// interrupt `irq`, the gate signals `pwm_r`/`pwm_i` of the six bridges
// (T1, T1-bar, T2, T2-bar each) and the safe-start status `en_r`/`en_i`.
//
// The partition into register bank, six modulators and sync manager follows
// the published design; the number of modulators is a parameter.
module chb_fpga_top
  import hbmod_pkg::*;
#(
  parameter int unsigned N_CELLS = 3,     // H-bridges in series in the front end
  parameter int unsigned ADDR_W  = 5
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cs,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [15:0]       wdata,
  output logic [15:0]       rdata,
  output logic              irq,
  output hb_gates_t         pwm_r [N_CELLS],
  output hb_gates_t         pwm_i [N_CELLS],
  output logic [N_CELLS-1:0] en_r,
  output logic [N_CELLS-1:0] en_i
);

  localparam int unsigned N_MOD = 2 * N_CELLS;

  hbmod_cfg_t       cfg [N_MOD];
  logic             enable;
  logic [N_MOD-1:0] sync_mask;
  logic [N_MOD-1:0] sync;
  logic [N_MOD-1:0] en;
  hb_gates_t        gates [N_MOD];

  mm_registers #(.N_MOD(N_MOD), .ADDR_W(ADDR_W)) u_regs (
    .clk, .rst_n, .cs, .we, .addr, .wdata, .rdata, .cfg, .enable, .sync_mask
  );

  for (genvar k = 0; k < N_MOD; k++) begin : g_mod
    hb_modulator u_hbmod (
      .clk, .rst_n, .enable,
      .period(cfg[k].period), .um(cfg[k].um), .phase(cfg[k].phase),
      .mode(cfg[k].mode), .polarity(cfg[k].polarity), .deadtime(cfg[k].deadtime),
      .gates(gates[k]), .sync(sync[k]), .en(en[k]), .carrier()
    );
  end

  sync_manager #(.N_MOD(N_MOD)) u_sync (.clk, .rst_n, .sync, .mask(sync_mask), .irq);

  for (genvar k = 0; k < N_CELLS; k++) begin : g_out
    assign pwm_r[k] = gates[k];
    assign pwm_i[k] = gates[N_CELLS + k];
    assign en_r[k]  = en[k];
    assign en_i[k]  = en[N_CELLS + k];
  end

endmodule
