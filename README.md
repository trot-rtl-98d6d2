# TROT: a three-edge ring oscillator TRNG with time-to-digital conversion

TROT is a small true random number generator (TRNG) for FPGAs. Its entropy
comes from the timing jitter of a ring oscillator. Most oscillator TRNGs sample
one jittery edge. TROT starts **three** edges at once in the same six-stage
ring. Every edge gathers its own independent Gaussian jitter. A time-to-digital
converter (TDC) then records where the edges are relative to one another. The
TDC result is one *raw bit* per 40 ns: 32 ns of accumulation plus one reset
cycle of an 8 ns system clock. The designers' model bounds its min-entropy at
0.770 bit or more.

A cheap linear post-processor then raises the entropy. It multiplies every 24
raw bits by the generator matrix of the [24,12,8] extended Golay code. The
result is 12 *internal bits* with a min-entropy rate of at least 0.999, at
12.5 Mbit/s.

This repository has SystemVerilog for the whole generator:

* synthesizable RTL for every digital part;
* behavioural simulation models, with delays and jitter, for the two parts
  that are physical timing structures on the FPGA. These are the ring
  oscillator and the carry-chain delay line.

## How one raw bit is made

```
 Run ──┬──────────────┬──────────────┐
       ▼              ▼              ▼
  ┌► NAND A ─► B ─► NAND C ─► D ─► NAND E ─► F ─┐      (ring: F feeds A)
  └──────────────────────┬──────────────────────┘
                         │C                    │F
                         ▼                     ▼
        sel ┌───────────────────────────────────────┐
   C ──────►│ mux0: C=1 → F, C=0 → constant 1       │  delay line,
            │ bin0 │ bin1 │ ... │ bin33  (2 mux/bin)│  34 bins ≈ 31.6 ps each
            └──┬──────┬──────────────┬──────────────┘
   C (falling) ▼      ▼              ▼
            ┌──────── 34 flip-flops C0..C33 ───────┐
            └──────────────────┬───────────────────┘
                 pulse width encoder: bit = XOR(C), valid = C0·C33·(some 0)
                               ▼
                 2 flip-flops on the system clock (load when Run is low)
```

The ring has three NAND stages (A, C, E), each gated by the enable `Run`, and
three buffers (B, D, F). While `Run` is low every NAND output is 1, so the ring
rests at all ones. When `Run` rises, all three NANDs fall together. That starts
three edges (origins 0, 1 and 2) a third of the ring apart. Each node now
toggles every two stage delays. The three-edge period T_3RO is four stage
delays (1042.57 ps on the reference device). The single-edge period T_1RO is
twelve (3127.7 ps). Stage F lags stage C by one stage delay, which is a quarter
period.

Stage C and stage F drive the TDC:

1. **Edge α, the last rising edge of C.** The first multiplexer of the delay
   line switches from the constant 1 to stage F. F is low at that moment, so
   a front of zeros runs down the line.
2. **Edge β, the next rising edge of F, about one stage delay later.** A front
   of ones follows the zeros down the line.
3. **Edge γ, the next falling edge of C, half a period after α.** Every
   falling edge of C clocks the 34 TDC flip-flops. The last one before `Run`
   falls is γ.

γ therefore captures a run of zeros framed by ones. Its width is about 8 bins
nominally. It depends on where α, β and γ fell, so on the jitter of all three
edges.

The pulse width encoder keeps only the parity of that width. With an even
number of bins, the XOR of all bits equals the parity of the zero count. A
*bubble* is a single flipped bin where two flip-flops resolve out of order. It
moves a zero without changing the count, so the XOR needs no bubble correction.

The capture is **valid** only when the first and last bins are 1 and at least
one bin between them is 0. If the edges have collided, the ring is in
single-edge mode. The zeros then reach the end of the line and the bit is
discarded.

After t_acc, `Run` stays low for one system clock cycle. That cycle resets the
ring, which makes consecutive bits independent. It also gives the encoder time
to settle. The clock edge that ends the cycle raises `Run` again and loads the
bit into the system clock domain.

A 9-bit ripple counter on stage C counts the oscillations of each run. The
designers used it to measure the ring's period. Here it also drives the total
failure test.

## Post-processing: the [24,12,8] Golay generator matrix

Let x0..x23 be 24 valid raw bits in arrival order. The output is y = G·x over
GF(2), with G = [A | I12]. A is the 12×12 circulant whose first row is

```
column  0 1 2 3 4 5 6 7 8 9 10 11
row 0   1 1 0 1 1 1 1 0 1 0  0  0
```

Row i of A is row 0 rotated right by i. So y_i = x_(12+i) ⊕ (row i of A · x0..x11).
Any non-zero combination of output bits is the XOR of at least 8 raw bits, so
output biases shrink roughly as the 8th power of the input bias. This is why
12 output bits carry more than 0.999 × 12 bits of min-entropy when each raw
bit has at least 0.770 bit.

The circulant structure makes the hardware tiny: twelve registers Q0..Q11 and
a mod-24 counter of valid raw bits.

* **Fill (valid raw bits 0–11).** Raw bits shift in at Q0. Nothing is output.
  At the end, Qk holds x(11−k).
* **Output (valid raw bits 12–23).** A multiplexer at the Q0 input closes the
  registers into a ring, so they rotate with each valid raw bit. The output is
  the incoming raw bit XORed with seven fixed taps. The taps are Q3, Q5, Q6, Q7,
  Q8, Q10 and Q11, which is Q(11−j) for each column j where row 0 of A has a 1.
  Each rotation moves the ring one row down the circulant.

The output bit and its strobe are registered one cycle after the raw bit that
completes them. Invalid raw bits are skipped: everything is enabled by the raw
strobe.

## Timing and interface of `trot_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | system clock, 125 MHz nominal (all timing below assumes 8 ns) |
| `rst` | in | 1 | synchronous reset, active high; hold for ≥ 2 cycles |
| `pp_bit`, `pp_valid` | out | 1, 1 | internal random bit and its one-cycle strobe |
| `raw_bit`, `raw_valid` | out | 1, 1 | raw bit and its one-cycle strobe (for external health tests) |
| `run` | out | 1 | ring oscillator enable |
| `cnt_sample` | out | M=9 | oscillation count of the latest run, sampled when `Run` falls |
| `alarm` | out | 1 | one-cycle strobe: that count was below `CNT_MIN` |
| `cnt_live`, `tdc_code` | out | 9, 34 | ripple counter and TDC snapshot, oscillator clock domain, for observation |

* `Run` is high for `ACC_CYCLES` = 4 cycles and low for 1. That gives one raw
  bit every 5 cycles, or 25 Mbit/s.
* `raw_valid` pulses at the edge that ends each low-`Run` cycle.
* `pp_valid` pulses one cycle after each of raw bits 12..23 of a block. That
  gives 12 internal bits per 24 raw bits, or 12.5 Mbit/s when every raw bit is
  valid.
* After reset the first raw bit appears within 7 cycles. The first internal bit
  appears after 13 raw bits, about 66 cycles.

Parameters, with the reference values as defaults:

| parameter | default | meaning |
|---|---|---|
| `N` | 34 | TDC bins (even; 33 cover one three-edge period) |
| `M` | 9 | ripple counter width |
| `ACC_CYCLES` | 4 | t_acc in clock cycles (32 ns) |
| `CNT_MIN` | `cnt_min(ACC_CYCLES)` = 20 | alarm threshold, ⅔ of t_acc / T_3RO (this design's choice) |
| `STAGE_DELAY_PS` | 260.64 | ring stage delay (T_1RO / 12) — model only |
| `JS_FS` | 9.7 | jitter strength J_S in fs (variance per unit time) — model only |
| `JITTER_SCALE` | 1.0 | multiplies the jitter sigma — model only, for stress tests |
| `BIN_DELAY_PS` | 31.59 | mean bin delay (T_3RO / 33) — model only |
| `BIN_SPREAD_PS` | 0 | random fixed bin-to-bin mismatch — model only |

`ACC_CYCLES` can span the whole range the reference evaluated, 1 to 20 cycles
(8–160 ns). Stay below 29 cycles: after about 232 ns the three edges start to
collide even on good silicon.

## Total failure test

In single-edge mode the ring toggles three times more slowly. The count after
t_acc then drops from about 30 to about 10 (at 32 ns).

`trot_total_failure_test` samples the ripple counter at the clock edge where
`Run` falls, which is exactly t_acc after the start. It raises `alarm` for any
bit whose count is below `CNT_MIN`.

The raw-bit validity already rejects bits from a collapsed ring. The alarm
tells the application that this is happening. The alarm is not sticky. Its
policy, such as how many alarms are tolerated and whether output is blocked,
is left to the user.

## Module hierarchy and files

```
trot_top                      rtl/trot_top.sv
├─ trot_run_ctrl              Run pattern and "last accumulation cycle" flag
├─ trot_noise_source          digital noise source (simulation model as a whole)
│  ├─ trot_ring_osc           behavioural: three-edge ring, jitter, collisions
│  ├─ trot_delay_line         behavioural: 34-bin carry-chain delay line
│  ├─ trot_tdc_sampler        34 flip-flops on the falling edge of stage C
│  ├─ trot_pw_encoder         parity and validity
│  ├─ trot_sys_capture        raw bit into the system clock domain
│  └─ trot_ripple_counter     9-bit ripple counter on stage C
├─ trot_total_failure_test    count threshold alarm
└─ trot_golay_postproc        [24,12,8] generator-matrix post-processing
trot_pkg                      shared constants
```

### Putting it on an FPGA

`trot_ring_osc` and `trot_delay_line` are simulation models. They use `#`
delays, `$urandom` and `fork`. To build real hardware, replace them inside
`trot_noise_source`:

* The ring becomes six LUTs: three 2-input NANDs and three buffers, with
  keep/dont-touch attributes and symmetric relative placement.
* The delay line becomes 17 CARRY4 primitives. The first one's select comes
  from stage C, and every second carry output goes to a TDC flip-flop placed
  in the same slice.

Everything else is ordinary synthesizable RTL. The reference implementation
fits the whole generator in 33 Zynq-7000 slices.

## Simulating

The testbenches need Verilator 5 with `--timing`. Every file starts with
`timeunit 1ps; timeprecision 1fs;`. For example, the end-to-end test:

```
verilator --binary --timing -Wno-fatal -Irtl rtl/trot_pkg.sv tb/tb_trot_top.sv \
          --top-module tb_trot_top -o sim && ./obj_dir/sim
```

Every testbench ends with `TB_RESULT checks=<n> failures=<n>`.

| testbench | what it shows |
|---|---|
| `tb_trot_ring_osc` | three-edge period 4·d (±1 %), F lags C by one stage, stop at all ones, collapse to 12·d under 40× jitter |
| `tb_trot_delay_line` | zero and one fronts travel one bin per bin delay; the snapshot shows the expected pulse; the line refills |
| `tb_trot_tdc_sampler` | capture on the falling edge only; asynchronous clear |
| `tb_trot_pw_encoder` | every pulse position and width, bubbles, random codes against a zero-counting reference |
| `tb_trot_sys_capture`, `tb_trot_run_ctrl` | load timing, one-cycle strobe, 4-high/1-low `Run`, 5-cycle raw period |
| `tb_trot_ripple_counter`, `tb_trot_total_failure_test` | counting with wrap, clear, threshold |
| `tb_trot_golay_postproc` | every output against a direct G·x product; 1-cycle latency; 12 out per 24 in; min distance 8 of the code (759 weight-8 words) |
| `tb_trot_noise_source` | raw bit equals the parity of the snapshot; pulse of 5–12 bins; count 30–31 after 32 ns; bit not stuck |
| `tb_trot_top` | nominal and 40×-jitter generators side by side: internal bits against a reference, 24.96 / 12.46 Mbit/s measured, invalid bits and alarms only from the stressed ring |
| `tb_trot_top_full` | default parameters, from reset through one full 24-bit block: 12 internal bits checked, exactly 12.50 Mbit/s |
| `tb_trot_tacc_sweep` | t_acc = 8, 16, 32, 64, 96, 160 ns: rates, internal bits, counts ≈ t_acc / T_3RO, no false alarms |

The simulated jitter is the reference device's, 1.6 ps per stage. The raw bits
in simulation are therefore random but far from unbiased at short t_acc. They
say nothing about the entropy of real silicon: that must be measured on the
device.

## Where this design departs from, or adds to, the reference

* **Validity strobe.** In the reference schematic both capture flip-flops are
  enabled by not-`Run`, so the captured validity would stay high for a whole
  accumulation. The post-processing, though, shifts on every clock in which
  the validity is high. The stated throughput, (k/n)/(t_acc + T_CLK) =
  12.5 Mbit/s, implies that each raw bit is used once. So the validity
  flip-flop here is a one-cycle strobe. The raw-bit flip-flop keeps the
  schematic's enable.
* **Resets.** The reference describes no system reset. This design adds a
  synchronous reset to the controller, the capture registers, the alarm and
  the post-processor. The TDC flip-flops get an asynchronous clear, standing
  in for the FPGA power-up value 0.
* **Ripple counter clear.** The counter is cleared while `Run` is low, so each
  run counts from zero. The reference needs the count "after t_acc" but does
  not say how it is reset.
* **Total failure test.** The reference only says the count "can be used to
  raise the alarm". The sampling point, the threshold of ⅔ of the nominal
  count and the alarm strobe are this design's. The multi-bit count crosses
  clock domains without a synchronizer. A sample taken during a ripple can be
  off by some counts, which the wide threshold margin absorbs.
* **Run controller.** Only the `Run` pattern is specified. The phase counter
  is the simplest circuit that produces it. The generator runs continuously
  after reset; there is no enable input.
* **Golay taps.** They come from the arithmetic above: first row of A, x0
  entering first. They are not read off a drawing.
* **Models.** The rising and falling delays are equal. The bins are uniform
  unless `BIN_SPREAD_PS` is set; the measured bin delays of the reference
  chip vary noticeably from bin to bin. The jitter uses independent per-stage
  Gaussian noise of variance J_S · d, approximated by a sum of twelve
  uniforms. Edge collisions are modelled as inertial cancellation within one
  stage delay.

## Not included

* **Online health tests.** The reference leaves them to future work. The raw
  stream is available at `raw_bit` / `raw_valid` for such tests.
* **The alternative [41,17,12] code.** It would give 12.96 Mbit/s at
  t_acc = 24 ns. The code is not cyclic and has no compact shift-register form.
* **Statistical evaluation.** This includes the NIST SP 800-90B estimators,
  the AIS-31 suite, and the attack and temperature/voltage experiments. They
  are measurements of silicon, not hardware.
