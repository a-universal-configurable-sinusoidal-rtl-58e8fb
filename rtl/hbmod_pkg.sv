// hbmod_pkg: types and constants shared by the H-bridge modulator and the
// converter-level FPGA design around it.
//
// The modulator works on 16-bit signed quantities: the triangular carrier,
// its half period Np, the phase shift Ns and the modulation value u_m. The
// dead time is an 8-bit count of clock cycles. These two widths and the
// four output modes (Table of modes: 00 normal/full bridge, 01 resonant/full
// bridge, 10 normal/half bridge, 11 resonant/half bridge) are the published
// ones. The register map of the bus-side register bank is this design's own
// choice: four 16-bit words per modulator, then two global words.
package hbmod_pkg;

  localparam int unsigned CNT_W = 16;   // carrier, period, phase shift, u_m
  localparam int unsigned DT_W  = 8;    // dead time in clock cycles

  // Output mode, bit 0 = resonant, bit 1 = half bridge.
  typedef enum logic [1:0] {
    MODE_NORMAL_FULL    = 2'b00,
    MODE_RESONANT_FULL  = 2'b01,
    MODE_NORMAL_HALF    = 2'b10,
    MODE_RESONANT_HALF  = 2'b11
  } out_mode_e;

  // Settings of one modulator as held in the register bank.
  typedef struct packed {
    logic signed [CNT_W-1:0] period;     // Np, half period of the carrier
    logic signed [CNT_W-1:0] um;         // modulation value
    logic signed [CNT_W-1:0] phase;      // Ns, phase shift of the carrier
    out_mode_e               mode;
    logic                    polarity;   // 1 = gate outputs active low
    logic [DT_W-1:0]         deadtime;
  } hbmod_cfg_t;

  // Gate signals of one H-bridge.
  typedef struct packed {
    logic t1;
    logic t1_n;
    logic t2;
    logic t2_n;
  } hb_gates_t;

  // Register map (word addresses). Modulator k occupies k*4 .. k*4+3.
  localparam int unsigned REG_PERIOD = 0;
  localparam int unsigned REG_UM     = 1;
  localparam int unsigned REG_PHASE  = 2;
  localparam int unsigned REG_CTRL   = 3;   // [1:0] mode, [2] polarity, [15:8] dead time
  localparam int unsigned REGS_PER_MOD = 4;
  // Global words follow the last modulator: ENABLE at N*4, SYNC_MASK at N*4+1.
  localparam int unsigned REG_G_ENABLE    = 0;
  localparam int unsigned REG_G_SYNC_MASK = 1;

endpackage
