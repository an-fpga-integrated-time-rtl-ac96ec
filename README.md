# Ring-oscillator TDC for measuring a programmable delay line's step

A programmable delay line (PDL) is specified with a nominal step, for
example 5 ps per code. Its real step differs from that value with the part,
the temperature and the supply voltage. Radar timing generators need the
real value. A step of a few picoseconds is far below what an FPGA counter
can resolve directly.

This design measures the step with ordinary FPGA logic and a reference
clock of about 8 ns. The idea is to turn a tiny delay difference into a
large, countable time:

1. The delay line under test is placed inside a **ring oscillator**. With
   control word `Y`, the ring period is

       T = 2 (Y·dT + t1 + t2)

   where `dT` is the unknown step, `t1` is the line's fixed delay and `t2`
   is the rest of the loop (pads, traces, the LUT).
2. A **frequency divider** stretches the period by `D = 10000`:
   `T0 = D·T`, tens of microseconds.
3. A **period measurement circuit (PMC)** counts reference-clock cycles
   over one stretched period: `X = D·T / TCLK`.
4. Measuring twice, at `Y1 = 1000` and `Y2 = 500`, and subtracting removes
   `t1` and `t2`:

       dT = TCLK / B,      B = 2 (Y1 − Y2) · D / (X1 − X2)

`B` is the converter's digital output code. A change of one count in `X`
corresponds to a loop delay change of `TCLK / 2D`. At `TCLK ≈ 8 ns` and
`D = 10000` that is about 0.4 ps, the converter's *equivalent
resolution*. It comes from averaging over `D` oscillations, not from a fine
delay chain.

For reference, the design was evaluated on four boards, one delay line
each. The reported codes were B = 1650, 1773, 1786 and 1726. With reference
clocks of 7.532, 7.940, 7.890 and 7.782 ns, those codes give steps of about
4.4–4.6 ps against a nominal 5 ps. The end-to-end testbench reproduces these
four cases.

## Structure

```
 FPGA (ro_tdc_top)
   start --> tdc_control --EN--> ro_lut --LO--+--> freq_divider --DO--> pmc --q/q_valid-->
              |      ^              ^         |                          ^    |
              |      +--- x1, x2 ---|---------|--------------------------|----+
              |      resolution_calc --> b    |                    clk --+
              |                     |LI       |LO
 pins:   sdata/sclk/sload         ro_in     ro_out
              |                     ^         |
              +--> [ programmable delay line, off-chip ] <--+
```

| Module | Role |
|---|---|
| `ro_tdc_top` | Wires the blocks below. The ring is closed off-chip through `ro_out` and `ro_in`. |
| `ro_lut` | The ring's only logic gate: `LO = NOT(EN AND LI)`. |
| `freq_divider` | Divide-by-`D` counter clocked by `LO`; its output is `DO`. |
| `pmc` | Synchronises `DO` into the `clk` domain and counts `clk` cycles between `DO` rising edges. |
| `tdc_control` | Sequencer for one measurement: load Y1, run, capture X1; load Y2, run, capture X2. |
| `pdl_loader` | Three-wire serial writer of the delay line's control word. Used by `tdc_control`. |
| `resolution_calc` | Computes `B` with a bit-serial restoring divider. |
| `tdc_pkg` | Default constants: D, Y1, Y2 and the widths. |

The delay line itself and the FPGA's input and output pad buffers are not
RTL. The line is an external chip; the pad buffers are inserted by
synthesis on `ro_in` and `ro_out`. For simulation, `tb/pdl_model.sv` models
the delay line behaviourally: delay `t_fixed + Y·step`, loaded over the same
three-wire bus.

## The ring oscillator and the enable gate

`ro_lut` implements this truth table:

| EN | LI | LO |
|----|----|----|
| 0  | 0  | 1  |
| 0  | 1  | 1  |
| 1  | 0  | 1  |
| 1  | 1  | 0  |

With `EN = 1` the gate inverts, so the loop has one inversion and
oscillates. Each half-period is one trip around the loop, which gives the
factor 2 in `T`. With `EN = 0`, `LO` is forced high and the ring stops.

There is no combinational loop inside the RTL. `LO` leaves the FPGA on
`ro_out`, and the returning edge arrives on `ro_in`. When building for
hardware, place the LUT and the two pads deliberately. Their delays are
part of `t2`, which the two-point method cancels, but that delay must stay
the same between the two measurements.

Stopping the ring can create one extra `LO` rising edge: if `LO` is low when
`EN` falls, `LO` goes high at once. The frequency divider counts that edge.
This is harmless, because the PMC discards the period that spans a stop (see
below).

## Frequency divider

`freq_divider` is a modulo-`D` counter clocked on the rising edge of `LO`.
`DO` is high for the first `ceil(D/2)` states and low for the rest, so `DO`
rises exactly once every `D` ring periods.

The reset is asynchronous because `LO` does not run while the ring is
stopped. Reset leaves the counter in its last state, so the first `LO` edge
after reset produces a `DO` rising edge. Because `rst_n` is used
asynchronously here and synchronously elsewhere, lint reports it as used
both ways. This is intended.

## Period measurement: what X really is

`pmc` passes `DO` through `SYNC_STAGES` (default 2) flip-flops in the `clk`
domain and then detects its rising edge. Every rising edge restarts a
30-bit counter at 1. At the next rising edge, the value reached is copied
to `q` and `q_valid` pulses. If two edges are detected in `clk` cycles `n`
and `n + X`, then `q = X`. The synchroniser delays both edges alike, so it
does not bias `X`.

Since `DO` is asynchronous to `clk`, a single `X` is `floor` or `ceil` of
`T0/TCLK`. So `X1 − X2` is exact to within ±2 counts. Around the operating
point (`X1 − X2 ≈ 6000`), that means ±1 in `B`. This is the spread seen in
simulation, and it matches the reported absolute error of one code.

**Arming.** A pulse on `clear` disarms the PMC. The first `DO` edge after
`clear` only re-arms it; the second edge produces a result. The controller
clears the PMC each time it restarts the ring. The first captured period
therefore starts and ends on edges produced with the new delay setting. No
period that spans a stop or a delay change is ever reported.

The counter saturates at `2^30 − 1` instead of wrapping. At the operating
point, `X` is about 20 000, so this limit is far away.

## Measurement sequence and the delay-line bus

`tdc_control` runs one measurement for each `start` pulse:

| Step | EN | Duration (clk cycles) |
|---|---|---|
| LOAD1: shift `Y1` into the delay line | 0 | `(2·Y_WIDTH+1)·HALF` + 2 |
| RUN1: clear the PMC, wait for its first result, store `X1` | 1 | about 1–2 `T0` |
| LOAD2: shift `Y2` | 0 | `(2·Y_WIDTH+1)·HALF` + 2 |
| RUN2: same as RUN1, store `X2` | 1 | about 1–2 `T0` |
| DONE: pulse `x_valid`, which starts `resolution_calc` | 0 | 1 |

The ring is stopped while the delay changes. A half-changed delay could
otherwise send a runt pulse into the divider. Two assertions check that
`EN` is low whenever the loader is busy, and that the loader is only
started when idle.

**Bus frame (this design's choice; check it against the delay line's data
sheet).** The delay line takes its control word over three wires. The
frame used here:

- `pdl_sdata` changes while `pdl_sclk` is low and is sampled on the rising
  edge of `pdl_sclk`.
- Bits go most significant first; the word is `Y_WIDTH = 10` bits.
- After the last bit, `pdl_sload` is high for one half-period, which applies
  the word.
- Each half-period lasts `HALF = 4` clk cycles.

A real two-channel delay line may expect a longer frame that carries both
channels, and its own bit order and strobe timing. Adapt `pdl_loader` to
the exact part. It is the only module that depends on it.

A whole measurement at the default settings takes about 0.5 ms of
simulated time.

## Computing B

`resolution_calc` takes `|Y1 − Y2|` and `|X1 − X2|`. It forms the
numerator `2·|Y1 − Y2|·D` (1e7 at the defaults) and runs a restoring
division with one quotient bit per clock. `b` and `b_valid` appear
`B_WIDTH + 2 = 34` clocks after `start`. The quotient is truncated, not
rounded. `err` is set, and `b` is 0, when `X1 = X2`, when the two
differences have opposite signs, or when the numerator does not fit in
`B_WIDTH` bits.

The step in picoseconds is `TCLK / B`. That division, like the error
estimate `ΔTCLK/TCLK + 1/B`, is left to whatever reads `b`: the design does
not know `TCLK`.

## Parameters (`ro_tdc_top`)

| Parameter | Default | Source |
|---|---|---|
| `D` | 10000 | as published |
| `Y1`, `Y2` | 1000, 500 | as published |
| `Q_WIDTH` | 30 | as published (width of the count Q) |
| `Y_WIDTH` | 10 | this design (the smallest width that holds 1000) |
| `B_WIDTH` | 32 | this design |
| `HALF` | 4 | this design (serial clock half-period) |
| `SYNC_STAGES` | 2 | this design |

## Departures and open points

- **Q as a running count.** The published timing diagram shows the count
  rising 0, 1, 2 … up to X between `DO` edges. Here, `q` presents only the
  completed count, and the running counter is internal.
- **Where B is computed.** On-chip computation of `B` is this design's
  reading. The published setup read the code out with an on-chip logic
  analyser, and how it was formed there is not stated.
- **Choices of this design.** The serial bus frame, the stop-while-loading
  sequencing, the synchroniser and arming, and the reset scheme. None was
  specified.
- **No repeat mode.** One `start` runs one measurement. The published
  experiment repeated each measurement 100 times; the testbench does the
  same by issuing `start` repeatedly.
- **Not covered by this RTL.** The delay line chip, the pad buffers, and the
  placement and routing constraints a real ring oscillator needs. The RTL
  has been checked only in simulation, with a behavioural delay line that
  has no jitter.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and exits. From the
top directory, for example:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv -Irtl rtl/tdc_pkg.sv tb/tb_ro_tdc_top.sv \
  --top-module tb_ro_tdc_top
obj_dir/Vtb_ro_tdc_top
```

| Testbench | What it checks |
|---|---|
| `tb_ro_lut` | All four input combinations of the gate. |
| `tb_freq_divider` | `D = 10000` and `D = 7`: `DO` rises exactly every `D` `LO` edges, starting with the first edge after reset, with the right high time. |
| `tb_pmc` | An exact 1000-cycle period gives `q = 1000`. A 1234.37-cycle period gives 1234 or 1235, with the right mean. No result appears before the second edge after `clear`. |
| `tb_resolution_calc` | `B` against the testbench's own division, at the operating point, for random operands and for the error cases. Latency is 34 cycles. |
| `tb_tdc_control` | PMC replaced by the testbench. Checks the words loaded (decoded by the delay-line model), that `EN` is low while loading, the timing of `EN`, that a stray PMC result is ignored, and `x1`/`x2`. |
| `tb_ro_tdc_top` | Whole design at default parameters, ring closed through `pdl_model`. |
| `tb_ro_tdc_sweep` | Whole design over a grid: reference clock 5–15 ns, step 4.0–5.0 ps. `B` must stay within the quantisation bound of `TCLK/step`. |

`tb_ro_tdc_top` simulates four boards with the reference clocks listed
above. Each board has a step of `TCLK/B_reported` and its own fixed loop
delay (3.3–3.6 ns, chosen for the test). It runs 100 measurements per board
and checks:

- the ring period;
- `X1` and `X2` to within 2 counts of `D·T/TCLK`;
- `B` against `X1` and `X2`, and to within 2 of the reported code;
- that `LO` stays high while `EN` is low;
- that `DO` spacing is exactly `D` `LO` edges.

Results: B = 1649–1650, 1773, 1786 and 1726. The run takes under a minute.

To try other delay lines, change `TCLK_NS`, `B_REP` and `FIXED_NS` in the
testbench, or the `t_fixed_ns`/`step_ns` inputs of `pdl_model`.
