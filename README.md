# Delay-chain TRNG for Intel Cyclone IV / Cyclone V FPGAs

A true random number generator that turns the timing jitter of a free-running
ring oscillator into bits. The jitter of an FPGA LUT is a few picoseconds,
far below what a flip-flop clocked at 100 MHz can resolve directly. The
generator therefore lets each oscillator edge run down a carry chain, whose
stages are only 7.5 ps (Cyclone V) to 42 ps (Cyclone IV) long, and samples
the whole chain at once. The chain is a time-to-digital converter. The
sampled thermometer code tells where the edge was to within one carry stage,
and the least significant bit of that position is random once enough jitter
has accumulated.

The generator was first designed for Xilinx carry primitives. This RTL is
its Intel Cyclone build. That build adds two things: a priority encoder that
works on *virtual bins* to undo the very uneven carry-stage delays of these
devices, and a set of on-chip circuits that measure the physical quantities
the design parameters depend on.

## How one bit is made

```
 enable ─► sample_ctrl ──ENA──► ring_oscillator (n = 3 stages)
                │                 │stage0    │stage1    │stage2
                │              delay_chain delay_chain delay_chain   (m stages each)
                │                 │m         │m         │m
                └─sample_en──► capture_bank (n x m flip-flops)
                                  │
                               xor_combine ──► c[m-1:0]
                                  │
                               priority_encoder (virtual bins) ──► raw_bit
                                  │
                               parity_filter (order k) ──► rnd_bit
```

1. `sample_ctrl` starts the oscillator. Every `T_A_CYCLES` clock periods
   (the accumulation time t_A) it pulses `sample_en`.
2. On that edge `capture_bank` stores all n x m chain stages.
3. The three oscillator stages switch one after the other, so at any moment
   one edge is in flight and it travels in one chain. `xor_combine` XORs
   the three captured chains stage by stage. The result `c` holds one
   transition, where the edge was.
4. `priority_encoder` finds the first stage p where `c[p] != c[0]`. It maps
   p to a virtual bin v and outputs `v[0]` as the raw bit. Example:
   `c[5:0] = 111000` gives p = 3, v = 3 without calibration, raw bit 1.
5. `parity_filter` XORs k consecutive raw bits into one output bit. This
   reduces the bias left by unequal bins.

Output rate = f_clk / (T_A_CYCLES x k). With a 100 MHz clock:

| build                    | m  | t_A    | T_A_CYCLES | k | rate        |
|--------------------------|----|--------|------------|---|-------------|
| Cyclone V, calibrated (default) | 60 | 20 ns  | 2  | 4 | 12.5 Mbit/s |
| Cyclone IV, calibrated   | 16 | 100 ns | 10         | 2 | 5 Mbit/s    |
| Cyclone V, uncalibrated  | 60 | 10 ns  | 1          | 9 | 11.1 Mbit/s |
| Cyclone IV, uncalibrated | 16 | 30 ns  | 3          | 8 | 4.17 Mbit/s |

Two rules fix the sizes. The chain must span one oscillator stage delay,
m x d_step > d_RO_stage, so that an edge is always caught: 60 x 7.5 ps =
450 ps > 435 ps on Cyclone V, and 16 x 42 ps = 672 ps > 400 ps on Cyclone IV.
t_A is the shortest multiple of the 10 ns clock for which the accumulated
jitter exceeds half a bin. The number of oscillator stages does not affect
entropy, so it is kept at 3.

## Virtual bins (calibration)

Carry-chain stages on these parts are far from equal. On Cyclone IV the worst bin
differs from the 42 ps mean by 1.4 times the mean, and the average
deviation (mean DNL) is 0.84. Calibration brings these to 0.32 and 0.085.
On Cyclone V they fall from 1.2 and 0.38 to 0.83 and 0.25. A narrow
bin almost never catches the edge, so the raw-bit LSB is biased. The fix is
to merge runs of consecutive physical bins into virtual bins of more even
width. Virtual bins average 13 ps instead of 7.5 ps on Cyclone V, and 83 ps
instead of 42 ps on Cyclone IV. The raw bit then alternates between virtual
bins instead of physical ones. Wider bins need a longer t_A. They also need
a lower parity order, and the trade-off gives the higher rates in the table.

The map is the parameter `VBIN_START[m-1:0]` of `priority_encoder`
(passed through `dc_trng` and `dc_trng_top`):

* `VBIN_START[p] = 1`: physical position p starts a new virtual bin.
* `VBIN_START[p] = 0`: p belongs to the same virtual bin as p-1.
* The virtual bin of p is the number of ones in `VBIN_START[p:1]`, and the
  raw bit is its LSB. Bit 0 is unused.

Example: `16'b1010_1010_1010_1010` merges the pairs {1,2}, {3,4}, … of a
16-stage chain into 8 virtual bins.

The map belongs to one device and one placement. **The default is all ones:
no merging, i.e. the uncalibrated encoder.** A build for real silicon must
measure its bins and supply its own map:

1. Run the generator and read the code-density histogram (below). The
   count in bin p divided by the total, times the time window, is the width
   of bin p.
2. Pick a target virtual width, e.g. 1.5 x the mean physical width. Walk the
   bins from 1 upwards and close a virtual bin when its accumulated width
   reaches the target. Set `VBIN_START` at each bin that opens a new one.
3. Choose t_A and the parity order for that width as above. Then raise the
   target width step by step while the output rate still improves. The
   output bits must still pass the statistical tests.

The tables are computed at elaboration; the encoder is combinational.

## Measurement circuits

The design parameters come from three physical quantities: d_RO_stage,
sigma_LUT and d_step. `dc_trng_top` carries one circuit for each, so they
can be measured on the target device itself.

* **`code_density_hist` (d_step and the bin widths).** The oscillator is not
  correlated with the clock, so an edge is equally likely at any time inside
  the chain's window. The number of hits per bin is therefore proportional
  to its width. The histogram counts the edge position of every raw sample
  of the generator's own XOR vector. That is the vector the encoder sees, so
  the map applies to exactly these bins. Outputs: `hist_rd_addr` →
  `hist_rd_count` (combinational), `hist_total`, `hist_misses`,
  `hist_clear`. Counters saturate at 2^16-1.
* **`ro_period_counter` (d_RO_stage).** An 8-bit ripple counter clocked by
  oscillator stage 0 is read every clock. `ro_count` is the number of
  oscillator periods in the last clock period. The stage delay is
  d_RO_stage = T_clk / (2 · n · mean(ro_count)). In simulation this gives
  435.2 ps for a 435 ps model. The counter is read without a synchroniser,
  so an occasional reading is wrong; averaging removes those.
* **`jitter_meter` (sigma_LUT).** Two more identical oscillators each drive a
  200-stage chain, which is long enough to always hold an edge (1500 ps >
  3 x 435 ps). Both chains are captured every cycle. `jm_diff` = position A −
  position B, in bins. Noise common to both oscillators cancels in the
  difference. The spread of successive differences, times d_step, is the
  jitter the two oscillators accumulate in one clock period: about
  sigma_LUT · sqrt(2 · 23) for 23 stage switches per 10 ns. Statistics are
  computed off-chip.

## What is RTL and what is a model

Synthesizable: `sample_ctrl`, `capture_bank`, `xor_combine`,
`priority_encoder`, `parity_filter`, `code_density_hist`,
`ro_period_counter`, plus the wiring in `dc_trng`, `jitter_meter` and
`dc_trng_top`.

Behavioural models, for simulation only:

* `ring_oscillator`: stage 0 is ~(ENA & last stage) and the other stages
  are buffers. Each transition is delayed by d_RO_stage plus Gaussian noise
  of sigma_LUT, and the delay is inertial. On silicon the ring is made of
  LUTs that are placed by hand. The input pin of each LUT must be fixed,
  because the pin changes the delay.
* `delay_chain`: m inertial delays, one per stage. `STEP_PS` holds the
  widths in ps, one per stage. The default is uniform at d_step; pass
  measured widths to see how calibration behaves. On silicon it is the carry
  path of an adder, placed by hand with its flip-flops, and each chain is fed
  through identical routing.

The simulator has two states, so the models do not show flip-flop
metastability. The entropy in simulation comes entirely from the jitter
model. A passing simulation shows that the logic is correct. It says
nothing about the randomness of a real device.

All files use `timeunit 1ps; timeprecision 10fs;`, so sub-picosecond delays
such as 7.5 ps are exact.

## Files

| file | content |
|------|---------|
| `rtl/dc_trng_pkg.sv` | Cyclone IV / V constants |
| `rtl/dc_trng_top.sv` | generator + histogram + period counter + jitter meter |
| `rtl/dc_trng.sv` | the generator |
| `rtl/sample_ctrl.sv`, `capture_bank.sv`, `xor_combine.sv`, `priority_encoder.sv`, `parity_filter.sv` | generator blocks |
| `rtl/code_density_hist.sv`, `ro_period_counter.sv`, `jitter_meter.sv` | measurement blocks |
| `rtl/ring_oscillator.sv`, `delay_chain.sv` | behavioural models |
| `tb/tb_<module>.sv` | self-checking testbench per module |
| `tb/tb_dc_trng_top_full.sv` | whole design, all defaults |

## Interfaces and timing

* Clock `clk` is 100 MHz. Reset `rst_n` is asynchronous and active low.
* ENA rises on the first clock edge that sees `enable` high. The chains are
  captured `T_A_CYCLES` edges later and then every `T_A_CYCLES` edges.
  `sample_en` is high in the cycle before each capture. `enable` low stops
  the oscillator and restarts the count.
* `raw_valid`/`raw_bit` follow a strobe by one cycle. `rnd_valid` is a
  one-cycle pulse, one cycle after every k-th raw bit.
* `no_edge` marks a raw sample whose vector held no transition. The sample
  still counts (raw bit 0), so the rate stays fixed. With the chain length
  rule above this should not happen.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example:

```
verilator --binary --timing -Wno-fatal -y rtl -Irtl \
    rtl/dc_trng_pkg.sv tb/tb_dc_trng_top_full.sv --top-module tb_dc_trng_top_full
./obj_dir/Vtb_dc_trng_top_full
```

* `tb_dc_trng` runs the default Cyclone V build next to a Cyclone IV build
  with a pair-merging map. It recomputes every raw bit from `c`, checks
  every output bit, and checks the sample spacing (12.5 and 5 Mbit/s).
  It also runs a 16-stage chain whose bins alternate 10 ps and 74 ps, once
  uncalibrated (t_A = 30 ns, order 8, 4.17 Mbit/s) and once with pairs
  merged. About 0.9 of the uncalibrated raw bits are ones, against about
  0.6 with calibration. The edges only cover the first ~400 ps of the
  chain, which ends part-way through a virtual bin. That partial bin
  leaves the 0.1 residue.
* `tb_dc_trng_top` runs the whole design in both builds. It stops and
  restarts the generator and checks the histogram against the raw bits:
  the number of ones must equal Σ hist[p]·LSB(vbin(p)). It also checks the
  recovered stage delay and the jitter meter.
* `tb_dc_trng_top_full` runs 6000 cycles of the default top (about
  1.5 minutes).

The event-driven chain models dominate simulation time. One jitter meter
(2 x 200 stages) simulates about 0.5 µs per second of wall time.

## Where this RTL makes its own choices

* The oscillator runs continuously while enabled, and one raw bit is taken
  every t_A. This gives exactly the rates in the table above.
* The sampling clock is the system clock with an enable.
* Edge position is the first stage that differs from stage 0. When two
  transitions are captured, the lower one wins.
* The `VBIN_START` encoding and its uncalibrated default.
* The parity filter XORs non-overlapping groups of k bits and uses a
  valid-strobe interface.
* Counter widths (16-bit histogram, 8-bit ripple counter), the 200-stage
  jitter chains, and the read-out of every measurement circuit.
* The histogram and the period counter are attached to the generator. They
  are not a separate test structure.

Not included: the hand placement and routing constraints, the calibration
search itself (an offline procedure that produces `VBIN_START`), and the
statistical test suite.
