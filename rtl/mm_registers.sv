// mm_registers: memory-mapped register bank between the control processor's
// address/data bus and the settings of N_MOD H-bridge modulators.
//
// Each modulator has four 16-bit words (see hbmod_pkg): PERIOD (Np), UM
// (u_m), PHASE (Ns) and CTRL ([1:0] output mode, [2] polarity, [15:8] dead
// time). Two global words follow the last modulator: ENABLE (bit 0, the
// common Enable of all modulators) and SYNC_MASK (one bit per modulator,
// selecting whose synchronization pulses raise the interrupt).
//
// The bus is a synchronous single-cycle port: a write takes effect at the
// clock edge where `cs` and `we` are high; a read returns the addressed word
// on `rdata` one clock after `cs` with `we` low. Writes to unused addresses
// are ignored and reads of them return 0. All registers reset to 0, except
// SYNC_MASK which resets to 1 (modulator 0 only). An asynchronous external
// bus must be synchronized to `clk` before this port.
//
// That such a bank connects the processor to the modulator inputs follows
// the published design; the map, the bus timing and the reset values are
// this design's own.
module mm_registers
  import hbmod_pkg::*;
#(
  parameter int unsigned N_MOD  = 6,
  parameter int unsigned ADDR_W = 5
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cs,
  input  logic               we,
  input  logic [ADDR_W-1:0]  addr,
  input  logic [15:0]        wdata,
  output logic [15:0]        rdata,
  output hbmod_cfg_t         cfg [N_MOD],
  output logic               enable,
  output logic [N_MOD-1:0]   sync_mask
);

  localparam int unsigned G_BASE = N_MOD * REGS_PER_MOD;

  initial assert (G_BASE + 2 <= 2**ADDR_W)
    else $error("ADDR_W too small for %0d modulators", N_MOD);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N_MOD; k++) cfg[k] <= '0;
      enable    <= 1'b0;
      sync_mask <= N_MOD'(1);
    end else if (cs && we) begin
      for (int k = 0; k < N_MOD; k++) begin
        if (int'(addr) == k*REGS_PER_MOD + REG_PERIOD) cfg[k].period <= wdata;
        if (int'(addr) == k*REGS_PER_MOD + REG_UM)     cfg[k].um     <= wdata;
        if (int'(addr) == k*REGS_PER_MOD + REG_PHASE)  cfg[k].phase  <= wdata;
        if (int'(addr) == k*REGS_PER_MOD + REG_CTRL) begin
          cfg[k].mode     <= out_mode_e'(wdata[1:0]);
          cfg[k].polarity <= wdata[2];
          cfg[k].deadtime <= wdata[15:8];
        end
      end
      if (int'(addr) == G_BASE + REG_G_ENABLE)    enable    <= wdata[0];
      if (int'(addr) == G_BASE + REG_G_SYNC_MASK) sync_mask <= wdata[N_MOD-1:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rdata <= '0;
    end else if (cs && !we) begin
      rdata <= '0;
      for (int k = 0; k < N_MOD; k++) begin
        if (int'(addr) == k*REGS_PER_MOD + REG_PERIOD) rdata <= cfg[k].period;
        if (int'(addr) == k*REGS_PER_MOD + REG_UM)     rdata <= cfg[k].um;
        if (int'(addr) == k*REGS_PER_MOD + REG_PHASE)  rdata <= cfg[k].phase;
        if (int'(addr) == k*REGS_PER_MOD + REG_CTRL)
          rdata <= {cfg[k].deadtime, 5'b0, cfg[k].polarity, cfg[k].mode};
      end
      if (int'(addr) == G_BASE + REG_G_ENABLE)    rdata <= 16'(enable);
      if (int'(addr) == G_BASE + REG_G_SYNC_MASK) rdata <= 16'(sync_mask);
    end
  end

endmodule
