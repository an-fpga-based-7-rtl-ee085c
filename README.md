# A slope ADC made of FPGA fabric

This is the digital core of an analog-to-digital converter that needs no
parts outside the FPGA. The target is an UltraScale+ class device running at
600 MHz. The converter works by timing, not by a comparator ladder:

* An output buffer is driven by the 600 MHz clock, with a weak drive
  (about 60 Ω) and slow slew. Its own pad capacitance turns every clock edge
  into a slow ramp. The ramp rises during the first half of the period and
  falls during the second half.
* An LVDS input buffer compares that ramp with the analog input. Its output
  goes high when the ramp passes the input voltage on the way up, and low
  again when the ramp passes it on the way down.
* The two edge times therefore encode the input voltage twice per clock
  period. The rising-ramp edge sits at `t_r`, and the falling-ramp edge at
  about `T - t_r`.
* A tapped delay line measures both times every clock. It is four carry
  chains sampled by flip-flops. From the two times the logic produces either
  two samples per clock (1.2 GS/s) or their mean (600 MS/s, with better
  effective resolution).

The RTL here covers everything after the carry chains: capture, bubble
filtering and edge search, averaging, code-density linearisation, the
time-to-voltage table, and the calibration sequence. The analog buffers, the
clock manager, the programmable delays and the carry primitives themselves
are device resources. They appear as ports of the top module
`fpga_adc_top`.

## One sample, step by step

Each clock cycle, every carry chain holds a snapshot of the comparator
output as it looked over the last ~1.1 clock periods:

* Tap 0 is the most recent moment.
* Higher taps are older.
* The comparator pulse appears as a run of ones with zeros on both sides.

```
tap index:   0 ......................................... 959
pattern:     0000000011111111111111111111111111111100000000
                     ^ direction-0 edge (0->1)        ^ direction-1 edge (1->0)
```

The pipeline turns that snapshot into a voltage:

| stage | module | cycles | what happens |
|---|---|---|---|
| capture | `tdc_capture` ×4 | 2 | two flip-flop stages; O taps inverted; taps reordered |
| edge search | `edge_detector` ×4 | 13 | bubble filter, then the first valid edge of each direction |
| chain mean | `mean_tree` ×2 | 1 | mean of the four chain positions, per direction |
| linearisation | `bin_correction` ×2 | 6 | position → bin-centre time code |
| voltage table | `voltage_lut` ×2 | 3 | time code → voltage code |
| 600 MS/s mean | `mean_tree` | 1 | mean of the two voltage codes |
| **total** | | **26** | |

The two per-edge codes (`s_rise_o`, `s_fall_o`) are registered once more so
that they come out together with the 600 MS/s code (`s600_o`). All three
appear 26 clocks after the carry-chain state they were measured from.

## The delay line and its capture (`tdc_capture`)

A CARRY8 block has eight carry elements. Each element has two useful
outputs:

* CO, the carry multiplexer output;
* O, the XOR output.

Because every select input is tied high, O is the inverse of the incoming
carry. Sampling both outputs doubles the number of taps, which is called dual
sampling. The first flip-flop stage samples CO and O exactly as they are.
The O values are inverted between the first and the second stage.

Tap order within a block is O0, CO0, O1, CO1, … O7, CO7.

The element delays inside a CARRY8 are not monotonic in that order. Feeding
the taps to the second stage in the order that static timing reports
reduces bubbles. The permutation is free in hardware, since it is only
routing between the two flip-flop stages. It is a parameter, `REORDER`:

* `REORDER` holds sixteen 4-bit fields.
* Field `s` names the natural tap that lands on slot `s` of each block.
* The default is the identity. The correct value depends on the device and
  the placement, and must come from your own timing report.

The default chain is 60 CARRY8 blocks, which gives 480 elements and 960
taps. A 600 MHz period needs about 426 elements (852 taps), so the chain is
deliberately longer than one period. The length calibration finds the real
length.

## Finding the edges (`bubble_filter`, `edge_detector`)

Carry-chain snapshots contain bubbles, which are isolated wrong bits near an
edge. The filter works on groups of `k/2 = 4` taps, with `k = 8`:

1. Compute `P(i)`, the number of ones in group `i`. This is a registered
   adder tree, `log2(k/2)` levels deep.
2. Compute the overlapping sums `S(i) = P(i) + P(i+1)`. Each covers 8 taps,
   and consecutive windows overlap by 4 taps, so an edge that falls exactly
   on a group boundary is still inside one window.

A window `i` holds a valid transition when all three conditions hold:

* `S(i)` is neither 0 nor `k`, so the window contains both values.
* The next window is mostly ones and the previous window mostly zeros.
  This gives direction 0, a 0→1 edge along the index.
* Or the next window is mostly zeros and the previous one mostly ones.
  This gives direction 1, a 1→0 edge.

The position within the chain is computed from the ones in the window:

* direction 1 (ones below the edge): `pos = i·k/2 + S(i)`
* direction 0 (zeros below the edge): `pos = i·k/2 + (k − S(i))`

The first window (lowest index) of each direction is chosen by a pipelined
priority tree. Windows without both neighbours cannot be tested, so edges in
the first and last few taps are never reported. The pulse must be kept away
from the chain ends, which is one reason for the alignment calibration.

**Naming.** The edge-search algorithm this design follows calls direction 0
the *falling* edge and direction 1 the *rising* edge. Its worked example
labels them the other way round. The module ports follow the algorithm
(`fall_*` = direction 0, `rise_*` = direction 1). Physically, tap 0 is the
newest sample, so:

* direction 0 (low index) is the later comparator edge, on the falling ramp;
* direction 1 is the earlier edge, on the rising ramp.

The names therefore also fit the ramps. The voltage tables absorb any sign
convention either way.

The natural pipeline depth at 960 taps is 12 cycles:

* 3 for the filter;
* 1 for the window test;
* 8 for the priority tree.

One pad register makes it 13 (`LATENCY` parameter). For smaller chains the
pad grows so that the latency stays as set.

## From position to time to voltage

### Averaging over four chains (`mean_tree`)

Four chains see the same pulse through slightly different delays, and their
mean has finer effective bins. The mean is the sum shifted right by two. If
any chain misses an edge, the whole sample is marked invalid rather than
averaged over fewer chains.

### Bin-by-bin linearisation (`bin_correction`)

Carry elements differ a lot in delay: some are almost zero, others several
times the mean. With a random input, the number of hits `H(k)` landing in
bin `k` is proportional to that bin's width. This is a code-density test.
After `N = 2^HIST_LOG2` hits:

```
INL(k) = Σ_{i<k} DNL(i) + DNL(k)/2              (bin centre, not bin edge)

corrected(k) = (2·Σ_{i<k} H(i) + H(k)) · 2^OUT_W / (2N)
             = (2·Σ_{i<k} H(i) + H(k)) >> (HIST_LOG2 + 1 − OUT_W)
```

Each bin is mapped to the time at its centre, on a scale where the whole
histogram spans `2^OUT_W` codes. The centre is used because it gives a
smaller RMS error than either bin edge.

Calibration runs in three phases:

1. Clear the histogram, one bin per clock.
2. Count exactly `N` valid positions, each as a read-modify-write of one bin.
3. Walk the bins once with a running sum and write the table. The last bin
   saturates.

The rising-edge and falling-edge paths each have their own instance. Their
histograms differ because the two edge polarities travel through the carry
chain at slightly different speeds.

In use, the correction is a registered table read plus pad registers, 6
cycles in total. Output is suppressed until the table is ready.

### Voltage characteristic (`voltage_lut`)

The ramp is not linear: it is an RC-like curve, and the comparator adds its
own shape. A second table per edge maps the corrected time code to a
voltage code. It is built outside the logic, by applying a known slow ramp,
matching samples to input voltage, and writing the result through the
`vlut_*` port. Until loaded, each table holds the linear map
`code >> (IN_W − OUT_W)`.

### 600 MS/s output

`s600_o` is the mean of the two voltage codes of the same clock period. The
1.2 GS/s stream is the pair `s_rise_o` / `s_fall_o` itself.

## Calibration (`adc_control`, `dc_length_cal`, `align_cal`)

After reset (with `AUTO_START`), on `cal_i`, or every `RECAL_CYCLES` clocks
of measurement if that is non-zero, `adc_control` runs three steps in order
and then enters `CTL_RUN`:

1. **Delay-chain length** (`dc_length_cal`).
   * Chain 0 is fed with the sampling clock itself (`chain_sel_clk_o`). The
     clock manager shifts its phase one step at a time through
     `ps_en_o`/`ps_done_i`, `N_PHASES` steps per turn.
   * For each phase, the ones in the chain are counted over
     `2^AVG_LOG2` snapshots.
   * A chain longer than one period sometimes holds the high half-period
     twice, and then over-counts. The minimum over all phases is therefore
     exactly half a period, and the chain length for one period is twice
     that minimum. It is reported on `chain_len_o`.
2. **Alignment** (`align_cal`).
   * A DC level is applied at which both comparator edges are equally far
     from the period boundaries. Choosing that level is done outside this
     logic.
   * The input delay tap (`idelay_tap_o`, strobed by `idelay_load_o`) is
     stepped until the mean of the two edge positions lies within `TOL`
     taps of the chain centre.
   * If most samples show the direction-1 edge below the direction-0 edge,
     the pulse straddles a period boundary, and the delay is increased
     whatever the centre says.
   * Running out of delay range, or seeing no valid sample within `TIMEOUT`
     cycles, sets `align_fail_o`.
3. **Bin-by-bin histograms.** Both `bin_correction` instances start
   together. The step ends when both tables are ready. The input should be
   spread evenly over the range during this step.

## Top-level interface (`fpga_adc_top`)

| group | ports |
|---|---|
| carry chains | `co_i`, `o_i`: `[4][N_ELEM]`, element 0 nearest the chain input |
| clock manager | `chain_sel_clk_o`, `ps_en_o`, `ps_done_i` |
| input delay | `idelay_tap_o`, `idelay_load_o` |
| control | `cal_i`, `state_o`, `run_o`, `cal_busy_o`, `n_cal_o`, `chain_len_o`, `align_fail_o` |
| voltage tables | `vlut_we_i`, `vlut_sel_i` (0 = rise table, 1 = fall table), `vlut_addr_i`, `vlut_data_i` |
| samples | `s1g2_valid_o`, `s_rise_o`, `s_fall_o`, `s600_valid_o`, `s600_o` |
| capture buffer | `fifo_arm_i`, `fifo_clr_i`, `fifo_rd_i`, `fifo_data_o` = `{rise, fall}`, `fifo_empty_o`, `fifo_full_o`, `fifo_overflow_o`, `fifo_count_o` |

`sample_fifo` stands in for the large on-chip buffer that a processor reads
the samples from:

* It is first-word fall-through.
* A write to a full buffer is dropped and sets a sticky overflow flag.
* The flag is cleared by `fifo_clr_i`.

Shared constants and the control-state enum are in `rtl/adc_pkg.sv`.

## Parameters and what they are based on

| parameter | default | basis |
|---|---|---|
| chains | 4 | published design |
| `BF_K` | 8 | published design |
| edge detector latency | 13 | published design |
| total latency | 26 | published design |
| `N_CARRY8` | 60 (960 taps) | own choice; must exceed one period (≈ 852 taps at 600 MHz) |
| `HIST_LOG2` | 16 | own choice (≈ 68 hits per bin) |
| `N_PHASES` | 112 | own choice; set to the clock manager's steps per turn |
| `ALIGN_TOL` | 4 taps | own choice |
| `TIME_W` / `VOUT_W` | 12 / 10 bits | own choice |
| `FIFO_DEPTH` | 4096 | own choice |
| `REORDER` | identity | must be set from the device's timing report |

## Departures from the published design

* **One clock.** Calibration and control run on the 600 MHz clock here. The
  original runs them at 200 MHz. Splitting them off would need clock-domain
  crossings for the control handshakes and for the histogram input.
* **Tap reordering** defaults to the identity, because the real order is
  specific to the device.
* **Voltage tables are loaded**, not computed on chip, because building them
  needs a known input ramp.
* **Alignment** adjusts only the input delay (not the clock output delay).
  It also has the extra edge-order rule described above.
* **Edge position for direction 0** uses `k − S(i)`. The single published
  position formula fits only the direction whose ones lie below the edge.
* **Invalid samples** are flagged rather than averaged over fewer chains.
* The measured chain length is reported but not used further downstream.
  The bin-by-bin table already maps positions to time.

## Simulation

Everything simulates with plain Verilator (5.x). Put the package first:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
    -y rtl -y tb rtl/adc_pkg.sv tb/tb_fpga_adc_top.sv --top-module tb_fpga_adc_top
./obj_dir/Vtb_fpga_adc_top
```

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops
itself. A watchdog counts a failure if a run hangs. All of them set their
state explicitly and work on a two-state simulator.

* **Unit tests.** There is one `tb_<module>` per RTL module. Each compares
  the module with an independent model in the testbench:
  * a reference edge search;
  * a reference histogram and table;
  * a model of the clock manager and the delay element.

  Where a latency is specified, it is checked to the cycle.
* **`tb_fpga_adc_top`** runs the whole design end to end at a reduced size:
  8 CARRY8 per chain, 2^12 histogram hits, 16 phase steps and a 64-word
  buffer. Latencies keep their full values.
* **`tb_fpga_adc_full`** runs the same scenario with the top at its default
  size. It makes about 74,000 checks and runs in well under a minute.

`adc_e2e_driver` models the parts outside the logic:

* A ramp with a sine-shaped non-linearity and a comparator.
* Four carry chains with random per-tap delays (0.25–1.75 × mean) and
  sampling jitter.
* The phase-stepped clock and the input delay.

Both end-to-end tests run the driver through the same steps:

1. The full automatic calibration.
2. Loading both voltage tables.
3. Random conversions with injected bubbles and occasionally blanked
   chains, each compared with the ideal code.
4. A step input to measure the 26-cycle latency.
5. A buffer overflow and readback.
6. A requested recalibration.

Each of these events is counted. A run in which one of them never happens
fails.

The accuracy tolerance in the end-to-end tests is one tap at the steepest
part of the ramp plus a margin for the finite histogram. It checks that the
whole chain is correct. It is not a measure of the converter's ENOB, which
depends on the real analog behaviour.
