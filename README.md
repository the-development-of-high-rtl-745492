# FPGA modulator for a three-level NPC inverter

A high-power three-level neutral-point-clamped (NPC) inverter has twelve
IGBTs, four per leg. This RTL is the FPGA half of a controller that splits the
work in two. A DSP runs the drive control (V/f, vector or sensorless control)
and sends an alpha/beta voltage reference, the phase currents and the two
DC-link capacitor voltages over a small parallel bus. The FPGA turns these
into the twelve gate signals. Twice per carrier period it recomputes the
modulation waves in a fixed-latency "interrupt block". That block does the
two-axis to three-phase transform, dead time compensation, zero-sequence
injection by a min/max split, and neutral-point balancing. The result is
latched when the DSP raises its synchronous signal, compared with a shared
triangular carrier, and passed through dead-time insertion.

The method follows X.-L. Peng et al., "The Development of High Power 3 Level
Inverter based on FPGA" (Seoho Electric). That work gives the structure, the
equations, the rates and the bus widths. Number formats, the register map, the
bus protocol and several small details are choices made here; they are listed
in "Own choices and departures" below.

Default operating point: 50 MHz FPGA clock (assumed), 1 kHz carrier (set at
run time), 2 kHz interrupt, 8-bit data and 13-bit address bus, 12 gates.

## The leg and its four switches

Each leg (U, V, W) has four IGBTs in series between the positive rail P and
the negative rail N. From top to bottom they are T1, T2, B1 and B2. Clamp
diodes tie the T2/T1 node and the B1/B2 node to the midpoint M of the split
DC link. Two pairs are complementary:

| pair    | driven by                              |
|---------|----------------------------------------|
| T1 / B1 | positive wave v_ip vs positive carrier |
| T2 / B2 | negative wave v_in vs negative carrier |

| output | T1 | T2 | B1 | B2 |
|--------|----|----|----|----|
| P      | 1  | 1  | 0  | 0  |
| M      | 0  | 1  | 1  | 0  |
| N      | 0  | 0  | 1  | 1  |

T1 on with T2 off is illegal. `pwm_gen` forces T2 on whenever T1 is on, so
this state can never be commanded.

The top's `gate[11:0]` packs `{T1,T2,B1,B2}` of leg p into `gate[4p+3:4p]`,
with p = 0, 1, 2 for U, V, W.

## How two waves and two carriers make three levels

This is the part of the design that takes the most care.

**Waves.** Each phase reference v_i (a, b, c) is split into two waves:

    v_ip = (v_i - min(va, vb, vc)) / 2      >= 0
    v_in = (v_i - max(va, vb, vc)) / 2      <= 0

Their sum, v_ip + v_in = v_i - (max + min)/2, is the phase reference with the
usual min/max zero-sequence signal added. This is the carrier-based equivalent
of space-vector modulation. Normally only one wave of a phase is non-zero:
- v_ip is 0 for the phase that is currently the minimum;
- v_in is 0 for the phase that is currently the maximum.

**Carriers.** The positive carrier spans 0..1 and the negative carrier spans
-1..0. The two are in phase and are built from one counter, `cnt`, in
`carrier_gen`:

    0, 1, ..., peak-1, peak-1, ..., 1, 0, 0, 1, ...

One period is 2*peak clocks, and every value occurs exactly twice. The
positive carrier is `cnt`; the negative carrier is `cnt - peak`.

**Compare levels.** On each sync, `mod_latch` turns the Q14 waves into
levels in counts:

    lp = v_ip * peak / 2^14            (0..peak)
    ln = peak + v_in * peak / 2^14     (0..peak)

The comparators are then `T1 = lp > cnt` and `T2 = ln > cnt`. With the
counter shape above, T1 is on for exactly 2*lp clocks per period, a duty of
v_ip. T2 is on for 2*ln clocks, a duty of 1 + v_in. The leg's average output,
in units of U_dc/2, is therefore v_ip + v_in.

Both pulses are centred on the valley of the triangle. A pulse is on while
its level is above the count, and the count is smallest at the valley.

**Timing of a change.** The DSP's synchronous edge does two things in the
same clock. It loads new levels and a new peak into `mod_latch`, and it
restarts the carrier at 0, rising. A carrier period therefore always uses one
consistent set of six levels. The pulses also stay aligned with the DSP even
if its period drifts or the PWM frequency is changed.

## The interrupt block

`int_timer` pulses every 25000 clocks (2 kHz). On each pulse,
`interrupt_block` samples its inputs and runs these steps as registered
stages:

1. **2r/3r** (`inv_clarke`): va = alpha; vb, vc = -alpha/2 ± (sqrt 3/2)·beta.
2. **Dead time compensation** (`dt_comp`):
   dU_DT = (T_DT + T_ON + T_OFF) · 1.0 / T_SS.
   - T_DT, T_ON and T_OFF are the dead time and the IGBT switching times, in
     clocks.
   - T_SS is the interrupt period in clocks.
   - 1.0 is the carrier peak.
   - Each phase gets +dU_DT if its current is positive and −dU_DT if it is
     negative. The magnitude needs a division, done by a 32-cycle serial
     divider (`udiv`).
3. **Zero sequence** (`zero_seq`): the v_ip / v_in split above.
4. **Neutral-point balancing** (`nppb`):
   dU_NPPB,i = kp·|ΔU_dc|·sign(ΔU_dc)·sign(v_ip + v_in − 1).
   - ΔU_dc = U_dc1 − U_dc2, the difference between the two capacitor
     voltages.
   - The offset is added to both waves of the phase.
   - Inside the linear range, v_ip + v_in < 1, so the offset is simply
     −kp·ΔU_dc. Its sign flips only for a wave driven above full scale.
5. Saturation: v_ip is clipped to [0, 1] and v_in to [−1, 0].

`done` pulses 37 clocks after the tick. The outputs hold until the next
pass. A tick that arrives while the block is busy is dropped. That cannot
happen at the default rates, because a pass takes 37 of the 25000 clocks.

The sum v_ip + v_in of each phase can be read back by the DSP as UAS, UBS
and UCS, for its output-voltage estimate.

The interrupt runs freely at 2 kHz. The latch uses whatever the last finished
pass produced when the sync arrives. If the DSP writes its reference just
after a sync, the next sync (1 ms later) latches a result computed from that
reference.

## DSP bus

The bus has 8 data bits and 13 address bits. The strobes `cs_n`, `rd_n` and
`we_n` are asynchronous and are synchronised with two flops each.

- **Writes.** Each 16-bit register is written low byte (even address) first,
  then high byte. The high-byte write updates all 16 bits at once.
- **Reads.** A read of the even address snapshots the whole register; the odd
  address then returns its high byte. Read data are valid 4 FPGA clocks after
  `rd_n` falls, so the DSP must stretch its read strobe with wait states.
- **Data pins.** `d_oe` enables the external tri-state data pad.

| addr | name   | access | meaning (reset value)                                   |
|------|--------|--------|---------------------------------------------------------|
| 0x00 | UALFA  | r/w    | alpha reference, Q14 (0)                                |
| 0x02 | UBETA  | r/w    | beta reference, Q14 (0)                                 |
| 0x04 | IA     | r/w    | phase current a, signed sample (0)                      |
| 0x06 | IB     | r/w    | phase current b (0)                                     |
| 0x08 | IC     | r/w    | phase current c (0)                                     |
| 0x0A | UDC1   | r/w    | upper capacitor voltage, signed sample (0)              |
| 0x0C | UDC2   | r/w    | lower capacitor voltage (0)                             |
| 0x0E | KP     | r/w    | balancing gain, unsigned Q8.8 (256 = 1.0)               |
| 0x10 | TDT    | r/w    | dead time, clocks (500 = 10 µs)                         |
| 0x12 | TON    | r/w    | IGBT turn-on time, clocks (50)                          |
| 0x14 | TOFF   | r/w    | IGBT turn-off time, clocks (100)                        |
| 0x16 | PEAK   | r/w    | carrier peak; f_pwm = f_clk / (2·PEAK) (25000 = 1 kHz)  |
| 0x18 | CTRL   | r/w    | bit 0: gate enable (0: all gates off)                   |
| 0x20 | UAS    | r      | applied phase reference a = v_ap + v_an, Q14            |
| 0x22 | UBS    | r      | applied phase reference b                               |
| 0x24 | UCS    | r      | applied phase reference c                               |
| 0x26 | STATUS | r      | number of completed interrupts (wraps)                  |

The rising edge of `dsp_sync` becomes a one-clock pulse after two
synchroniser flops. A new PEAK value takes effect at the next sync.

## Number formats

- **Modulation signals.** Signed Q14: 16384 = 1.0 = the peak of the positive
  carrier. A Q14 reference of amplitude m gives a phase voltage of amplitude
  m·U_dc/2. The linear range of the min/max split reaches m = 2/sqrt 3.
- **Currents and DC-link voltages.** Raw signed 16-bit samples. Only their
  sign (currents) and their difference (voltages) matter, through KP.
- **Times.** All times are counts of the FPGA clock.

## Dead time

`dead_time_gen` handles each complementary pair separately:
- the switch being turned off goes off one clock after its command changes;
- the other switch comes on TDT clocks after that (at least one clock).

A pulse shorter than TDT therefore vanishes. A T1 pulse of 2·lp clocks comes
out 2·lp − TDT long. The compensation in the interrupt block is there to
restore the lost volt-seconds.

## Modules

| file                  | role                                                          |
|-----------------------|---------------------------------------------------------------|
| `npc_pkg.sv`          | rates, widths, Q14 helpers, gate struct, register map         |
| `npc3l_fpga.sv`       | top level, wires everything below                             |
| `bus_decoder.sv`      | DSP bus slave, register file, sync synchroniser               |
| `int_timer.sv`        | 2 kHz interrupt divider                                       |
| `interrupt_block.sv`  | sequencer of the per-interrupt computation                    |
| `inv_clarke.sv`       | alpha/beta → a/b/c                                            |
| `dt_comp.sv`, `udiv.sv` | dead time compensation offset and its serial divider        |
| `zero_seq.sv`         | v_ip / v_in split                                             |
| `nppb.sv`             | neutral-point balancing offset                                |
| `mod_latch.sv`        | sync-time latch and scaling into carrier counts              |
| `carrier_gen.sv`      | triangular carrier counter                                    |
| `pwm_gen.sv`          | comparators, 12 raw gates                                     |
| `dead_time_gen.sv`    | dead time insertion and enable                               |

The synthesized top is about 480 word-level cells and 1100 flip-flops, with
no memories.

## Simulating

Each block has a self-checking testbench in `tb/`. Every testbench prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

    verilator --binary --timing --top-module tb_npc3l_fpga -Irtl -Itb -y rtl -y tb \
        rtl/npc_pkg.sv tb/tb_npc3l_fpga.sv -o sim && ./obj_dir/sim

Replace `tb_npc3l_fpga` with `tb_<block>` to run a single block.
`tb_int_model.svh` (a floating-point model of one interrupt pass) and
`dsp_bus_tasks.svh` (bus cycles of a DSP) are shared includes.

`tb_npc3l_fpga` runs the top at its default sizes, 1.3 million clocks, in a
few seconds. A DSP model writes a 50 Hz rotating reference (modulation 0.85,
two periods at 1.25), currents lagging by 0.5 rad, and capacitor voltages
whose difference changes sign. It checks the following:
- the read-back applied references against the model, to 3 LSB;
- the on-time of every T1 and T2 in every carrier period against the model's
  levels with the dead time taken off, to 16 clocks;
- the position of the T1 turn-off relative to the sync, including after one
  sync that arrives 1000 clocks late;
- that no illegal gate combination appears in any clock;
- that all gates stay off until enabled;
- that there are two interrupts per millisecond.

It also counts every mechanism: both signs of each offset, saturation, the
P/M/N levels, dead-time gaps, the PWM frequency change to 1.25 kHz and the
late sync. A mechanism that never happened counts as a failure.

`tb_npc3l_workloads` runs the drive's operating points through the top at
default sizes, 5 million clocks. Each workload is one full fundamental cycle:
- the rated point, 50 Hz at 1140 V;
- the two sensorless test speeds, 1192 rpm and 893 rpm of the 4-pole motor
  (39.7 Hz and 29.8 Hz);
- the low end of the V/f range, 5 Hz, which runs for 20 ms only.

The voltage follows a straight V/f line through the rated point. Currents are
zero, so the applied references equal the commanded ones. The same per-period
and per-clock checks are made as above. For each full-cycle workload, the
largest read-back line-to-line reference is converted to an RMS line voltage.
It must be within 2% of the commanded voltage. At 50 Hz it gives 1132 V for
1140 V, because the reference is read back only once per carrier period.

## Own choices and departures

These points are not given by the method and were chosen here:

- 50 MHz clock. Q14 waves and the scaling of KP. The register map, the byte
  order and the read/write protocol. Reset values of TDT, TON, TOFF and KP.
- The dead time offset takes the sign of the phase current and is limited to
  0.5. It is added to the phase references before the zero-sequence split,
  following the order of the steps (2r/3r, oscillation suppression, dead time
  compensation, zero sequence, NPPB).
- The NPPB offset is limited to ±1.0. ΔU_dc is taken as upper minus lower
  capacitor.
- A triangular carrier, with the positive and negative carriers
  level-shifted and in phase.
- The saturation of the waves, the T2-follows-T1 guard, and the gate-enable
  bit.

These points depart from the original system:

- **Oscillation suppression is not implemented.** The original interrupt
  block runs it between 2r/3r and dead time compensation, but its algorithm
  is not specified.

The DSP, its converters, the keypad and the power stage are outside this RTL.
