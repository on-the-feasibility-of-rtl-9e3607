# TC-TERO: a configurable TERO true random number generator for Xilinx FPGAs

A transition effect ring oscillator (TERO) is a loop of two NAND gates and
two chains of buffers, closed like an RS latch. When its control input CTRL
rises, both gates switch at once and the latch oscillates. The low and high
pulses have slightly different widths, and the gates amplify that difference
on every pass. The oscillation therefore dies after a number of periods that
varies from one start to the next because of jitter. The parity of that
number is a random bit with a known stochastic model.

The weakness of a plain TERO is that the number of oscillations depends
heavily on where the ring is placed. One placement gives a usable spread of
counts. Another gives an almost constant count, and a third never stops.
This design makes each branch of the ring a *three-path configurable ring
oscillator* (TC-RO) chain. A 20-bit run-time parameter `rosel` then chooses
among about a million physical paths, so a good path can be selected on a
given device without re-placing the design. A controller counts the
oscillations, detects the end of each one, catches saturation and runaway
rings, and turns every good count into one random bit.

```
            rosel[19:0]
                |
   CTRL  +------v-------+  TO   +----------------+ q[8] +-----------------+
 ------->| tc_tero_ring |--+--->| tero_counter   |----->| tero_end_detect |--> OE
   ^     +--------------+  |    | 9 bit, TO clk  |--+   | PRE flop (TO)   |
   |                       +----|                |  |   | EN flop (clk)   |
   |                            +----------------+  |   +-----------------+
   |                                  q[7:0]        |          ^ PRE, EN, TMO
   |                                    v     SET   v          |
   |                              +--------------------+   +-----------+
   |                              | tero_cnt_reg (clk) |   | tero_ctrl |<- OE
   +------------------------------|  CNT, 0xff if sat  |   +-----------+
          (CTRL from tero_ctrl)   +--------------------+        | VALID
                                            | CNT               v
                                      +-------------+   +-----------+
                                      | lsb_extract |-->| lfsr_xor  |--> rnd_bit
                                      +-------------+   +-----------+
                                         raw_bit
```

## The configurable ring

### One TC-RO chain

A chain that replaces B buffers and one NAND gate has B+1 *stages*. Each
stage has two copies, upper and lower, and each copy is one 6-input LUT used
as a 3:1 multiplexer. The three inputs of a stage's multiplexers are:

* the upper output of the previous stage,
* the lower output of the previous stage,
* the output of an F7MUX that chooses between those two. The F7MUX is the
  dedicated 2:1 multiplexer that joins two LUTs in a Xilinx slice, so it
  costs no LUT.

Stage `j` is set by two bits:

| `rosel[2j+1]` | `rosel[2j]` | signal taken by both multiplexers of stage `j` |
|:-:|:-:|---|
| 0 | 0 | previous upper LUT, directly |
| 0 | 1 | previous lower LUT, directly |
| 1 | 0 | previous upper LUT, through the F7MUX |
| 1 | 1 | previous lower LUT, through the F7MUX |

The same even bit steers the F7MUX, so a single bit decides "upper or
lower", and the odd bit decides "direct or through the F7MUX". Both copies of
a stage carry the same logic value. What differs is *which* physical LUT is
in the active path, and that is decided by the **next** stage's even bit.
The path delay of a chain is therefore

    tau = sum over stages j of  delay(copy of stage j picked by rosel[2(j+1)])
                              + delay(F7MUX j)   if rosel[2j+1] = 1

The "next stage" of the last stage is the first stage of whatever the chain
drives. The last stage's LUT also holds the NAND gate, with CTRL as its
second input. A chain with B buffers costs 2B+2 LUTs and has 2B+2
configuration bits. `tero_pkg::chain_delay()` computes `tau` exactly this
way.

`tc_ro` closes one such chain on itself. The top carries one of these
beside the generator, with its own ports (`tcro_ctrl`, `tcro_sel`,
`tcro_out`), as a frequency-configurable oscillator in its own right. With B = 3 (`STAGES = 4`, an 8-bit
parameter) it is a ring oscillator with period `2*tau`. The output
multiplexer ROOut reads the two NAND outputs, or the F7MUX between them,
with `rosel[1:0]`. That is the same choice stage 0 makes, so ROOut is always
the signal that is actually in the ring.

### The TERO made of two chains

`tc_tero_ring` uses two chains:

* **Branch 1**: N = 3 buffers, 4 stages, `rosel[7:0]`. It ends in NAND1,
  whose output is TO.
* **Branch 2**: M = 5 buffers, 6 stages, `rosel[19:8]`.

Each branch's NAND pair drives the first stage of the other branch. Branch 1
contributes `tau1` and branch 2 contributes `tau2`. The relative imbalance is
`d0 = (tau2 - tau1)/(tau1 + tau2)`. With equal element delays, 4 elements
against 6 give `d0 = 0.2`.

## Timing of one sample

`tero_ctrl` runs on the system clock (100 MHz by default) and loops over
three states:

1. **IDLE** (4 cycles). CTRL is 0, so both NANDs output 1 and the ring
   rests. The counter is held cleared, the precharged flop is held at 1, and
   OE is dropped.
2. **RUN**. CTRL = 1 and the ring starts. TO falls, is low for about `tau1`
   and high for about `tau2`. The low pulse then narrows on every period
   until it disappears. Each rising edge of TO is one oscillation.
   * TO is a clock. On the FPGA it goes through a regional clock buffer
     (BUFR); here it is a plain wire. It clocks the 9-bit counter.
   * TO also clocks the *precharged flop*. Time is cut into 40 ns periods
     (4 cycles). PRE presets that flop to 1 in the first cycle. Any later TO
     rising edge loads `Q[8]` into it. `Q[8]` is 0 unless the counter has
     saturated. In the last cycle, EN copies the flop into OE. So OE = 1
     means "no TO edge for about 30 ns, or the counter is saturated".
   * Once the count reaches 256, `Q[8]` stays 1 (the counter holds). The
     CNT register then reads `0xff` through its asynchronous SET.
   * A fail-safe timer forces OE after 2 us. It covers a ring that keeps
     running while the counter fails to count.
3. **DONE** (1 cycle). VALID is high and CNT holds the sample. TIMED_OUT
   says whether the timeout ended it.

The ring needs CTRL low again before it can restart, so one sample costs:

    oscillations * (tau1 + tau2)   +   up to 40 ns to see the end
                                   +   10 ns register delay
                                   +   50 ns (DONE + IDLE)

With the default model delays a well-configured ring gives about 80 to 120
oscillations of 6 to 7.5 ns each. That is 700 to 900 ns per sample, or
roughly 1.1 to 1.5 Mbit/s of raw bits. Real hardware measured with this scheme reached
1.9 Mbit/s.

**Limit of the end detector.** OE can only see the ring running if TO rises
inside the 30 ns after the precharge cycle. A ring with a period over about
30 ns is reported as stopped. With the 8 to 10 LUT delays of this ring the
period is far shorter, but keep this in mind if you change `PRE_NS` or
`CLK_NS`.

## From counts to bits

`lsb_extract` emits `CNT[0]` for every sample that is neither saturated
(`0xff`) nor timed out. The parity of the oscillation count is the entropy.

`lfsr_xor` XORs each raw bit with the next bit of a 4-bit LFSR. The LFSR
uses x^4 + x^3 + 1, starts from state 0001 and advances once per raw bit.
This removes the slight bias of the raw stream. The raw stream is the one to
use for entropy assessment, and both are brought out.

## The behavioural ring models

A TERO has no logic description: its output is analog timing. Two files are
therefore behavioural models, and no synthesis tool can build them:

* **`tc_ro.sv`** is structural. Every LUT and F7MUX is a continuous
  assignment with its own propagation delay. The ring really oscillates in
  the simulator, and its testbench measures the period against
  `chain_delay()`. Synthesis sees only the multiplexer/NAND loop, which is
  why tools warn about a combinational loop in it.
* **`tc_tero_ring.sv`** produces the TO waveform from the stochastic model
  of the TERO. The pulse widths are `T/2*(1-d)` low and `T/2*(1+d)` high,
  with `T = tau1 + tau2`. After each period the imbalance is updated as
  `d <- R*d + sigma_r*g`, where `g` is a standard normal sample. The ring
  stops, resting at 1 (or at 0 for negative `d`), once `|d| >= 1`. The
  defaults R = 1.01908 and sigma_r = 0.00192 are values fitted to a measured
  ring. With `d0 = 0.116` they give a mean of about 114 oscillations.

**Element delays.** These are not published. This model uses a 0.5 ns LUT,
a 0.3 ns F7MUX, and a ±25 % per-element spread drawn from a hash of `SEED`,
which stands for one placement. Over random configurations this gives the
behaviour reported for hardware: most configurations give small counts, a
minority fall in the useful 96..127 band, and a few saturate. Changing
`SEED` models another placement or device.

On an FPGA the ring is built from LUT1/LUT2-style primitives (here LUT6 plus
F7MUX) with DONT_TOUCH and relative-placement constraints. That
instantiation is vendor-specific and is not part of this RTL.

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| `tc_tero_trng` / `tc_tero_ring` | `SEED`, `LUT_NS`, `F7_NS`, `VAR_FRAC` | 1, 0.5, 0.3, 0.25 | model delays (own choice) |
| | `R`, `SIGMA_R` | 1.01908, 0.00192 | amplification and relative jitter |
| `tc_tero_trng` / `tero_ctrl` | `CLK_NS` | 10 | system clock period (own choice) |
| | `PRE_NS` | 40 | precharge period |
| | `TIMEOUT_NS` | 2000 | fail-safe timeout |
| `tero_ctrl` | `IDLE_CYCLES` | 4 | ring rest time between samples (own choice) |
| `tc_ro` | `STAGES` | 4 | stages per chain (3 buffers + NAND stage) |
| `tero_pkg` | `N_BUF`, `M_BUF` | 3, 5 | branch lengths; give `SEL_W` = 20 |

## What follows the published design and what does not

These follow it:

* branch lengths 3 and 5
* the 20-bit TC-RO parameter and its bit meanings
* 9-bit counter with `Q[8]` as the saturation flag
* precharged end detector
* CNT register set to `0xff`
* 40 ns precharge period and 2 us timeout
* LSB of non-saturated counts as the raw bit
* XOR with a 4-bit LFSR

These are this implementation's own choices:

* **Bit layout.** `rosel[7:0]` configures branch 1 and `rosel[19:8]`
  configures branch 2. TO passes through branch 2's stage-0 selection.
* **Stage count.** The last configurable stage is the one fused with the
  NAND gate. This gives 2B+2 bits per chain, as the published parameter
  width requires, rather than the 2B that a drawing of the chain might
  suggest.
* **Counter clearing and holding.** The counter is cleared asynchronously
  between samples, and it holds at 256.
* **Controller.** The IDLE/RUN/DONE sequence, the positions of PRE and EN
  inside the period, the ENABLE/VALID handshake and the 100 MHz clock are
  all chosen here.
* **Timeouts.** Timed-out samples are dropped from the bit stream.
* **LFSR.** The polynomial and seed are chosen here.
* **Ring model.** All element delays, and the exact jitter law, are chosen
  here.
* **Size.** The controller uses about 45 flip-flops, including the
  post-processing and a full 8-bit timeout counter. The published ring plus
  controller used 40 LUTs and 29 flip-flops, so that implementation's
  controller is leaner than this one.

The published design also has a T flip-flop that takes the count parity in
the plain TERO. It is replaced here by the counter LSB, which is the same
bit.

## Simulating

All files use `timescale 1ns/1ps`. Packages must come first. Each testbench
prints `TB_RESULT checks=N failures=M` and ends with `$finish`.

```
verilator --binary --timing --assert -Wno-fatal -Irtl \
    rtl/tero_pkg.sv rtl/*.sv tb/tb_tc_tero_trng.sv --top-module tb_tc_tero_trng
./obj_dir/Vtb_tc_tero_trng
```

| Testbench | What it shows |
|---|---|
| `tb_tc_ro` | TC-RO period equals twice the selected path delay for 16 configurations |
| `tb_tc_tero_ring` | first pulse widths equal tau1/tau2; exact oscillation count without jitter; mean and spread with jitter |
| `tb_tc_ro_sweep` | all 256 TC-RO parameters on four placements: every period against the path delay, and the frequency spread (min, quartiles, max) per placement |
| `tb_tero_counter` | counting, saturation hold at 256, asynchronous clear |
| `tb_tero_end_detect` | OE for quiet ring, running ring, saturation, timeout, clear |
| `tb_tero_cnt_reg` | capture and asynchronous 0xff |
| `tb_tero_ctrl` | 40 ns PRE/EN spacing, timeout at exactly 2 us after CTRL, one VALID per sample |
| `tb_lsb_extract`, `tb_lfsr_xor` | bit selection; XOR with the hand-derived key stream 000100110101111 |
| `tb_tc_tero_trng` | three generators: normal samples, a never-stopping ring that saturates, and a slow ring (15 ns) that times out. Every CNT is checked against the TO edges counted by the testbench, and every bit against the sample's LSB and the key. |
| `tb_tc_tero_trng_full` | default parameters; 256 random configurations x 64 samples, sorted by mean count into small / 96..127 unsaturated / large, with the raw bit rate |
| `tb_tc_tero_trng_stats` | 4096 samples of one configuration with a noiseless count near 112: mean, spread, share at or below the median, share of ones in the raw and whitened streams; then one fixed configuration on four placements (`SEED` 2..5), whose mean counts differ widely |

The ring model draws its jitter from `$urandom`, so different simulator
seeds give different counts. The checks do not depend on the seed.
