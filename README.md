# Configurable sinusoidal modulator for H-bridge converters

An H-bridge has two legs, and each leg is a complementary pair of switches:
the upper switch on means the lower one off. So one signed modulation value
u_m is enough to drive a whole bridge. Leg 1 compares u_m with a triangular
carrier, and leg 2 compares -u_m with the same carrier. This RTL builds such a
modulator ("HB-mod") as a reusable block. Many copies can run side by side:

- In cascaded H-bridge (CHB) multilevel converters, the copies take
  phase-shifted carriers.
- In resonant converters, the carrier period itself is modulated (pulse
  frequency modulation, PFM).
- During soft start, a bridge can run as a half bridge.

Around the modulator sits the control design of a single-phase seven-level
CHB active front end. It has three series bridges on the grid side, each
with its own dc link, plus one inverter bridge behind each dc link. That
makes six modulators. A register bank ties them to a control processor's
bus, and a sync manager gives the processor an interrupt on the carrier
turning points.

## The carrier

`hbmod_carrier` is a signed 16-bit up-down counter. It moves one count per
clock between -Np and +Np. One carrier period therefore takes 4·Np clocks:

    Np = f_clk / (4 · f_PWM)

While the common `enable` is low, the counter is held at the phase shift Ns
and set to count up. When `enable` rises, it starts from there. Ns ranges
over [-Np, +Np], which is a carrier phase shift of -90°..+90°
(Ns = φ/90 · Np). Modulators that share one Enable signal thus start in a
fixed phase relation. That is how phase-shifted PWM is set up for any number
of cascaded bridges.

The counter turns round when `count >= Np` (going up) or `count <= -Np`
(going down). Np can therefore be rewritten at any time, and a smaller value
takes effect at once; PFM relies on this. `sync` is high for the one clock in
which the running carrier sits at +Np or -Np.

## From comparison to gate signals

`hbmod_comparator` gives `count < ref`: the upper switch of a leg is
commanded on while the carrier is below the reference. `hb_modulator` builds
the second reference as -u_m, saturated so that -(-32768) becomes +32767.
`hbmod_mode_logic` then applies the 2-bit output mode:

| mode | name | leg 1 (T1 on) | leg 2 (T2 on) |
|------|------|---------------|---------------|
| 00 | normal, full bridge | carrier < u_m | carrier < -u_m |
| 01 | resonant, full bridge | carrier < u_m | carrier >= -u_m |
| 10 | normal, half bridge | carrier < u_m | never (T2-bar on) |
| 11 | resonant, half bridge | carrier < u_m | never (T2-bar on) |

The bridge voltage is U_dc·(T1 − T2). The two full-bridge modes differ as
follows:

- **Normal mode** gives unipolar three-level PWM. For u_m > 0 the bridge
  switches between +U_dc and 0, so the average output follows u_m. This is
  the mode for CHB cells.
- **Resonant mode** inverts the second comparison. The bridge then gives
  +U_dc around the carrier bottom, −U_dc around the top, and zero in between.
  Both polarities thus appear in every carrier period:
  - u_m sets the pulse width, with zero vectors between the pulses.
  - Np sets the frequency.

  This suits resonant converters (PFM) and phase-shifted full bridges.

In the half-bridge modes, leg 2 is held with T2 off and T2-bar on, so the
bridge runs as a half bridge. Mode bit 0 then makes no difference.

Each leg command goes through a dead-time generator, `hbmod_deadtime`. When
the command changes, the switch that was on turns off one clock later. Both
switches then stay off for exactly `deadtime` clocks (8 bits, 0..255) before
the other switch turns on. If the command flips back during the gap, the gap
restarts. An assertion states that T and T-bar are never on together.
Finally, `polarity = 1` inverts all four gate outputs for drivers with
active-low inputs. The "all off" state is inverted too.

Latency: a gate output follows a comparator change after two clock edges,
plus the dead time if that switch is the one turning on.

## Safe start

Starting many bridges at once is the risky moment: a modulator that starts
with stale or empty data, or in the middle of a carrier slope, can cause an
over-current. `hbmod_safe_start` keeps all four gates off (both switches of
each leg) until the internal enable `en` is set. `en` is set one clock after
a carrier turning point (`sync`) at which u_m is non-zero. It stays set until
Enable is removed, and clearing Enable turns all gates off within two clocks.

The start-up sequence for the processor is:

1. Write Np, Ns and the control word of every modulator.
2. Set the common Enable; all carriers start in their fixed phase relation.
3. Write u_m. Each modulator starts switching at its next turning point.

## Converter-level design (`chb_fpga_top`)

```
 processor bus ──► mm_registers ──► hb_modulator ×6 ──► pwm_r[0..2], pwm_i[0..2]
                                          │ sync ×6
 irq ◄────────── sync_manager ◄───────────┘
```

- Modulators 0..2 drive the front-end bridges r1..r3. Their outputs in series
  form the seven-level grid-side voltage.
- Modulators 3..5 drive the inverter bridges i1..i3.
- `N_CELLS` (default 3) sets the number of cells.

**Register bank (`mm_registers`).** The bus is synchronous:
- A write happens on the clock edge where `cs` and `we` are high.
- A read returns data on `rdata` one clock after `cs` with `we` low.
- An asynchronous processor bus must be synchronized to `clk` first.

Word addresses:

| address | register | contents |
|---------|----------|----------|
| 4k+0 | PERIOD k | Np, signed 16 bit |
| 4k+1 | UM k | u_m, signed 16 bit |
| 4k+2 | PHASE k | Ns, signed 16 bit |
| 4k+3 | CTRL k | [1:0] mode, [2] polarity, [15:8] dead time |
| 24 | ENABLE | [0] common Enable of all modulators |
| 25 | SYNC_MASK | [5:0] modulators whose sync pulses raise `irq` |

Everything resets to 0, except SYNC_MASK, which resets to 1 (modulator 0).
Unused addresses read as 0.

**Sync manager (`sync_manager`).** It ORs the `sync` pulses of the
modulators selected in SYNC_MASK. Any selected pulse starts an `irq` pulse of
`IRQ_LEN` (default 4) clocks, one clock later. With one source selected, the
processor gets an interrupt twice per carrier period, at the top and at the
bottom. It can pace its control loop on that and write the next u_m values.

## What follows the original design and what does not

**Taken from the original design:**
- the 16-bit symmetric counter, the period formula Np = f_clk / (4·f_PWM) and the ±90° phase-shift range;
- the two comparators on u_m and -u_m;
- the four output modes and their encoding;
- half-bridge forcing of leg 2;
- the 8-bit dead time on both pairs;
- the Polarity, Enable and Synchronization signals;
- the two safe-start conditions;
- six modulators behind a memory-mapped register bank, with a sync manager
  that raises one interrupt.

**Design choices of this RTL, where the original says nothing:**
- the register map and the bus timing;
- the reset values;
- the unit of the dead time (clock cycles);
- that the counter is held at Ns while disabled;
- `en` requires the turning point and a non-zero u_m in the same clock, and is
  cleared only by Enable;
- the sync manager's mask, OR and pulse stretching;
- the saturation of -u_m;
- which polarity value means inverted.

**Reconstructed rather than stated:** the resonant-mode rule (leg 2 uses the
inverted comparison) is read from the shape of the described resonant-mode
output voltage. It is not stated as a rule.

**Timing of `en` between modulators.** The original shows each modulator's
enable rising at its own time after valid data is written, without times.
Here each one rises at that modulator's next turning point.

**Not included:**
- the control processor (a TMS320F28335 in the original system) and its
  software;
- the IGBT power stage.

The processor bus and `irq` are ports of the top. So are the 24 gate signals.

**Clock frequency.** The original system does not state the FPGA clock. The
16-bit period limits the carrier to f_PWM ≥ f_clk / 131068. At 50 MHz that is
about 380 Hz, so an 800 Hz carrier (Np = 15625) fits. An 800 Hz carrier fits
with any clock up to 104.8 MHz.

## Files

`rtl/`:
- `hbmod_pkg.sv`: widths, mode enum, configuration struct, register map.
- `hbmod_carrier.sv`, `hbmod_comparator.sv`, `hbmod_mode_logic.sv`,
  `hbmod_safe_start.sv`, `hbmod_deadtime.sv`: the parts of one modulator.
- `hb_modulator.sv`: one complete H-bridge modulator.
- `mm_registers.sv`, `sync_manager.sv`, `chb_fpga_top.sv`: the converter
  design.

`tb/`: one self-checking testbench per module. Each prints
`TB_RESULT checks=N failures=M`. The modulator and top-level testbenches
compute the expected gates from a closed-form triangle, not from the design.

`tb_chb_fpga_top` runs the top at its default size:
- It programs three phase-shifted front-end cells and three inverters in the
  other modes (one with inverted polarity, one held back by safe start).
- It writes a sampled sine at every interrupt and checks every gate on every
  clock.
- It requires all seven levels of the series voltage.
- It then checks the dead time, a period change and the shutdown.

`tb_workload_inverter_800hz` runs one modulator as a single-phase inverter
for five periods of a 208 Hz sine on an 800 Hz carrier. It assumes a 50 MHz
clock, so Np = 15625. Over every half carrier period it checks that the mean
bridge voltage equals u_m/Np. It does this once without and once with a 1 µs
dead time.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/hbmod_pkg.sv tb/tb_chb_fpga_top.sv --top-module tb_chb_fpga_top -o sim
./obj_dir/sim
```

Replace `tb_chb_fpga_top` with any other testbench name to run that test.
Each test finishes in seconds. To lint a module, run
`verilator --lint-only -Wall -Irtl -y rtl rtl/hbmod_pkg.sv rtl/<module>.sv`.
