# Multi-standard look-up-table digital predistorter

A power amplifier run close to saturation distorts its output, and the
distortion depends on the signal as well as on its average power. A 3G
(WCDMA) signal, a 4G (OFDM) signal and a 5G NR signal at the same average
power bend the amplifier's AM/AM curve differently. Each of them, however,
reaches roughly the same curve at some other power level. So one set of
predistortion coefficients, trained once with one standard at one power
level, also serves the other standards if they are offset by the right
number of dB.

This design applies that idea in FPGA logic. Eight coefficient sets for a
memory polynomial predistorter sit in a look-up table (LUT). Each set
covers one amplifier "operating point". For every standard, the point is
reached at a different power:

| set            | 1   | 2   | 3   | 4   | 5   | 6   | 7   | 8   |
|----------------|-----|-----|-----|-----|-----|-----|-----|-----|
| 5G level, dBFS | -10 | -9  | -8  | -7  | -6  | -5  | -4  | -3  |
| 4G level, dBFS | -18 | -17 | -16 | -15 | -14 | -13 | -12 | -11 |
| 3G level, dBFS | -20 | -19 | -18 | -17 | -16 | -15 | -14 | -13 |

The hardware measures the power of the outgoing signal. It combines that
power with the declared standard to pick a set, and keeps loading that set
into a predistorter. The predistorter processes eight samples per clock.
The table above is the default. It belongs to one particular amplifier and
is set by the `BASE_DBFS` parameter of `address_select`.

## Data path

```
 host AXI-Stream ──► signal_stimulus ──► mp_core ──► m_axis (to the RF data converter / DAC)
                           │                ▲
                           ▼                │ coefficient port (shadow bank + commit)
                     address_select ──► coef_lut
                           ▲                ▲
 host AXI4-Lite ──► axil_regs ──────────────┘ (LUT writes, control, status)
```

All streams are 256-bit AXI-Stream beats. Each beat holds eight complex
samples of 16-bit I and 16-bit Q in Q1.15. Lane 0 (bits [31:0]) is the
earliest sample. In every lane, I is in the low half-word and Q in the high
half-word. Coefficients are 16-bit I/Q pairs in Q4.12, so gains up to ±8
fit.

| module            | role |
|-------------------|------|
| `dpd_top`         | wires the blocks below; only plain ports |
| `signal_stimulus` | holds a test signal of up to 8750 beats (70,000 samples) and replays it in a loop |
| `address_select`  | measures the power, picks the set, keeps copying the set into `mp_core` |
| `coef_lut`        | 8 sets × 32 slots (25 used) of complex coefficients |
| `mp_core`         | 8-lane memory polynomial, order 5, 5 taps |
| `basis_gen`       | one per lane: x·\|x\|^(p-1) for p = 1..5 |
| `cordic_mag`      | pipelined CORDIC magnitude inside `basis_gen` |
| `coef_mult`       | one per lane: 25 complex multiply-accumulates |
| `axil_regs`       | AXI4-Lite register file |
| `dpd_pkg`         | shared widths, the `cplx_t` sample struct and the `std_e` standard enum |

## The parallel memory polynomial (`mp_core`)

The predistorter computes

    y(n) = Σ_{m=0..4} Σ_{p=1..5} c(m,p) · x(n-m) · |x(n-m)|^(p-1)

for every sample, which takes 25 complex coefficients. Eight samples arrive
per clock, so the core has eight basis generators and eight coefficient
multiplication blocks.

**Basis generation.** `basis_gen` gets |x| from a 16-iteration vectoring
CORDIC. The CORDIC has 3 guard bits and removes the CORDIC gain with one
constant multiply. Its result saturates at 32767, so signals must be scaled
to |x| ≤ 1. From |x|, a chain of rounded Q1.15 multiplies forms |x|², |x|³
and |x|⁴, one per stage. A last stage multiplies x by each power. Because
|x| ≤ 1, no basis term can overflow.

**Taps across beat boundaries.** Output lane j needs the basis terms of
samples n, n-1, …, n-4. For lanes 0–3 some of these samples were in the
previous beat. `mp_core` therefore keeps the basis terms of lanes 4–7 of the
last accepted beat in a history register. Tap m of lane j reads
`bv[j-m]` when j ≥ m, and `hist[4+j-m]` otherwise. The stream must stay
continuous: after reset the history is zero.

**Coefficient update without glitches.** `coef_we/coef_addr/coef_data`
write single coefficients into a shadow bank. Index = m·5 + (p-1). A
`coef_commit` pulse copies the whole shadow bank into the active bank in one
clock, so an output sample never mixes two sets. After reset, the active
bank is the identity (c(0,1) = 1.0), so samples pass through unchanged until
a set is committed.

**Arithmetic.** Each product is kept at full precision (33 bits). The 25
products are summed, rounded to nearest at the Q1.15 point and saturated
to 16 bits.

**Timing.** Latency is 24 cycles: 18 in the CORDIC, 3 for the powers, 1 for
the basis products and 2 in `coef_mult`. Throughput is one beat (8 samples)
per clock. Flow control is a single clock enable, `ce = !m_tvalid |
m_tready`, which is also `s_axis_tready`. A stalled output therefore
freezes the whole pipeline. `tlast` travels with its beat.

## Choosing and loading a set (`address_select`)

**Power.** For each accepted beat on the link between the buffer and the
predistorter, `address_select` adds up I² + Q² over all 8 lanes. Over a
window of 2^`WIN_LOG2` = 1024 samples it forms the mean power. 0 dBFS means
a mean |x|² of 2^30, a full-scale Q1.15 amplitude.

**Set choice.** Set k (1-based) of standard s belongs to the level
`BASE_DBFS[s] + (k-1)` dBFS. The threshold between sets k and k+1 lies
half a dB above set k's level. Thresholds are computed at elaboration as
`2^30 · 10^((BASE_DBFS[s] + k + 0.5)/10)`, so no table is stored. The
chosen set is the number of thresholds the mean power reaches. A level below
set 1 gives set 1, and a level above set 8 gives set 8.

**Continuous update.** While `upd_en` is high, the block sweeps without
pause. Each sweep does the following:
- It latches the set: the measured one, or the host's `manual_set` when
  `auto_sel` is 0.
- For each of the 25 coefficients it reads the LUT (one-cycle read) and
  writes the value into the shadow bank.
- It pulses `coef_commit`.

A commit follows every 52 cycles. The set in use therefore follows the
measured power within one window plus one sweep.

Manual mode (`auto_sel = 0`) lets software on the host processor make the
set choice itself. The hardware still handles the loading.

## Signal buffer (`signal_stimulus`)

While `load_en` is high, beats from the host stream are stored from
address 0. Storing stops at the beat marked `tlast`, or when the buffer is
full, and the stored length can be read back. While `play_en` is high, the
stored beats are replayed in a loop. `tlast` marks the last beat of each
pass. The read is a registered RAM read, issued only when the output
register is free. This honours backpressure without a FIFO. The default
depth of 8750 beats holds a 70,000-sample test signal.

## Registers (`axil_regs`, 12-bit byte address, 32-bit data)

| address | access | content |
|---------|--------|---------|
| 0x000 | rw | CTRL: [0] play_en, [1] load_en, [2] auto_sel, [3] upd_en |
| 0x004 | rw | STD: 0 = 3G, 1 = 4G, 2 = 5G (3 is treated as 5G) |
| 0x008 | rw | SET: set used when auto_sel = 0 (0-based) |
| 0x00C | ro | STATUS: [2:0] committed set, [10:8] measured set, [16] a window has completed |
| 0x010 | ro | POWER: mean \|x\|² of the last window |
| 0x014 | ro | LENGTH: beats in the signal buffer |
| 0x400 + 4·(set·32 + m·5 + p-1) | wo | LUT word: [15:0] I, [31:16] Q (Q4.12) |

A write is accepted when AW and W are both valid. WSTRB is ignored. Typical
bring-up:
1. Write the eight sets into the LUT.
2. Set CTRL = 0x2 and stream the signal in.
3. Write STD.
4. Set CTRL = 0xD (play, automatic selection, update).

## Fixed by the method, chosen here

Taken from the method this design implements:
- 8 samples per clock on a 256-bit AXI-Stream with 16-bit I/Q.
- A memory polynomial of order 5 with 5 memory taps.
- A CORDIC for |x| and one basis generator per sample.
- One coefficient multiplication block per output.
- Eight coefficient sets shared across 3G/4G/5G through the power offsets
  in the table above.
- A block that picks the set from power and standard and keeps updating
  the coefficients.
- A 70,000-sample test signal.

Chosen in this design:
- Q4.12 coefficients, the rounding and the saturation.
- The CORDIC depth.
- The lane order.
- The shadow/active coefficient bank.
- The clock-enable stall scheme.
- The power window, the 0 dBFS reference and the ±0.5 dB set boundaries,
  with clamping at both ends.
- The buffer's load/replay scheme.
- The whole register map.
- Asynchronous active-low reset.

Departures and open points:
- Memory-polynomial formulas are written with two index conventions: p =
  1..P with |x|^(p-1) and m = 0..M, or p = 0..P with |x|^p. This design uses
  p = 1..5 with |x|^(p-1) and exactly 5 taps (m = 0..4). That gives 25
  coefficients.
- A system with an application processor may run the set choice in
  software and write coefficients over AXI-Lite. Here the choice is made in
  hardware by default; manual mode covers the software variant.
- The default power table belongs to one amplifier. A different amplifier
  needs its own `BASE_DBFS` offsets (and its own coefficients).
- Coefficient training (least squares) is not part of the hardware. The
  LUT must be filled with coefficients trained offline.
- Timing closure at the target sample rate has not been checked. 737.28
  MSPS at 8 samples per clock needs a 92.16 MHz clock.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`.

- **Real-valued reference.** `tb/mp_ref_pkg.sv` holds a real-valued memory
  polynomial model. `basis_gen_tb`, `mp_core_tb` and `dpd_top_tb` compare
  against it: basis terms within 8 LSB, outputs within 24 LSB.
- **Bit-exact.** `coef_mult_tb` is bit-exact against 64-bit integer
  arithmetic.
- **Latency.** `cordic_mag_tb` checks 18 cycles and `basis_gen_tb` 22.
  `mp_core_tb` checks 24 cycles and 64 beats on 64 consecutive clocks.
- **Flow control.** The testbenches use random gaps and random backpressure.
  `mp_core_tb` also checks that a shadow write without commit changes
  nothing.
- **Set choice.** `address_select_tb` drives every table level of every
  standard. It checks the measured power (±3 %), the chosen set and the 25
  committed words.
- **Precision.** `mp_nmse_tb` runs 30,000 Gaussian-distributed samples at
  -12 dBFS rms through two cores side by side: the default core (order 5,
  5 taps) and one built with `ORDER=3, TAPS=3`, a size commonly used for an
  amplifier model. It reports the normalised mean square error against the
  real-valued model. It is about -86 dB for both, which is well below the
  -25 to -46 dB at which such models and predistorters perform, so the
  fixed-point datapath does not limit them.
- **End to end.** `dpd_top_tb` runs the top at its default sizes:
  - it loads a full 70,000-sample signal, plays it as 5G at -8 dBFS
    (set 3), then as 4G (clamped to set 8), then with manual set 6;
  - it reloads a 3G signal at -17 dBFS (set 4);
  - it checks every output sample after each switch has settled (over
    80,000 checks), and counts stalls, set changes, standard switches and
    buffer wrap-arounds.

To simulate one testbench with Verilator:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/dpd_pkg.sv tb/mp_ref_pkg.sv tb/dpd_top_tb.sv --top-module dpd_top_tb
    ./obj_dir/Vdpd_top_tb

(For testbenches that do not use the reference package, leave out
`tb/mp_ref_pkg.sv`.) Lint with
`verilator --lint-only -Wall -Irtl -y rtl rtl/dpd_pkg.sv rtl/dpd_top.sv`.
The concurrent assertions check the AXI rules: a stalled stream beat must
stay valid and unchanged, and AXI-Lite responses must hold until they are
taken.
