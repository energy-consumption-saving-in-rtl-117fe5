# Pan-Tompkins filtering accelerator for a low-power embedded processor

A battery-powered ECG monitor has to process every sample before the ADC delivers
the next one. A small processor running the whole Pan-Tompkins QRS detector spends
most of its cycles on the filtering, so this design moves the filtering into a
small piece of hardware next to the processor, on an AXI4-Lite bus. The processor
keeps the decision logic: peak picking, adaptive thresholds and beat
classification.

Suppose the processor alone draws power P and needs time T per block of work. It
then spends energy P·T. With the accelerator the same work takes αT (α = 1/S for a
speed-up S) and draws P + P_acc. Energy falls if α < 1/(1+K), where K = P_acc / P.
A shift-only filter chain is tiny next to a processor, so K ≪ 1 and almost any
speed-up pays. The gain can be taken two ways:

* **Direct:** keep the clock and finish each sample S times sooner. The processor
  then idles for the rest of the sample period.
* **Indirect:** slow the clock by S, so the time per sample is unchanged and the
  dynamic power falls in proportion. A speed-up of about ten has been reported for
  this split of hardware and software, so a 100 MHz system can run at 10 MHz.
  Where the supply voltage can be lowered with the clock (an ASIC rather than an
  FPGA), the saving is larger still.

The RTL here is the accelerator: the filter chain and its bus slave. The processor,
the ADC and the clock generator are not part of it.

## The filter chain

Each input sample passes through five stages. Each stage is one register deep and
advances only when a sample arrives (`in_valid`). The coefficients are those of the
classic Pan-Tompkins detector for a 200 Hz sample rate. All of them are powers of
two, so the only multiplier in the chain is the squarer.

| stage | module | equation (x = stage input) | output scaling | width (16-bit samples) |
|---|---|---|---|---|
| 15 Hz low-pass | `pt_lowpass` | y[n] = 2y[n-1] − y[n-2] + x[n] − 2x[n-6] + x[n-12] | /32 | 17, signed |
| 5 Hz high-pass | `pt_highpass` | p[n] = p[n-1] + x[n] − x[n-32]; y[n] = 32x[n-16] − p[n] | /32 | 19, signed |
| derivative | `pt_derivative` | y[n] = 2x[n] + x[n-1] − x[n-3] − 2x[n-4] | /8 | 19, signed |
| squaring | `pt_squarer` | y[n] = x[n]² | /32 | 32, unsigned |
| moving-window integration | `pt_mwi` | y[n] = Σ x[n-k], k = 0..31 | /32 (the mean) | 32, unsigned |

Some points about these stages are easy to miss:

* **The low-pass is recursive, but exact.** The low-pass is an IIR filter whose
  poles cancel zeros. Its impulse response is the 11-tap triangle
  1,2,3,4,5,6,5,4,3,2,1, with a DC gain of 36. Integer arithmetic keeps the
  recursion exact, so it never drifts. The accumulator needs 7 bits above the input
  width, and the output keeps one more bit than the input, because 36/32 > 1.
* **The high-pass is a delay minus a box filter.** A 32-sample running sum p[n] is
  subtracted from the input delayed by 16 samples and scaled by 32. The result can
  reach 64× full scale before the /32, so two bits are added.
* **Scaling is by arithmetic shift.** Every division is a right shift, which
  rounds toward minus infinity. This is why a constant negative input can leave an
  output of −1 instead of 0.
* **No stage can overflow.** Each output width is the worst case for a full-scale
  input of the width before it. The square of the 19-bit derivative, divided by
  32, fits exactly in 32 bits. The integrator's running sum keeps 5 more bits.
* **The integrator starts empty.** It keeps a 32-word window and a running sum,
  adding the newest square and subtracting the one that drops out. After reset or
  CLEAR, the missing samples count as zero. The window must be a power of two,
  because the mean is a shift.
* **The derivative is delayed.** The five-point derivative is made causal, so it
  lags the band-passed signal by two samples. The high-pass adds 16 samples of
  delay, the low-pass 5 and the integrator about 16. So a QRS shows up in MWI
  about 35–40 samples (roughly 0.2 s) after its R wave.

### Pipeline timing and alignment

`pt_filter_chain` takes one sample per clock at most. The first stage register is
loaded by the edge that takes the sample. The integral of that sample appears with
`mwi_valid` four clocks after that edge.

The processor also wants the band-passed value, the slope and the square of the
same sample: the decision rules use peak height and maximum slope. So the chain
carries copies of the earlier stage outputs alongside the pipeline. Each copy moves
on the valid of the stage it is waiting next to. As a result `bp_data`,
`deriv_data`, `sq_data` and `mwi_data` always belong to one input sample, even when
samples arrive on consecutive clocks.

## Bus interface and programming model

`pt_axil_regs` is an AXI4-Lite slave with 32-bit data and a 6-bit address. It
holds eight registers. The constants are in `pt_pkg`.

| offset | name | access | contents |
|---|---|---|---|
| 0x00 | CTRL | R/W | bit 0 CLEAR (write 1; empties the chain, zeroes COUNT and the flags; reads 0), bit 1 IRQ_EN |
| 0x04 | STATUS | R, W1C | bit 0 READY (a result not yet read), bit 1 OVERRUN (a result arrived while READY was set; write 1 to clear) |
| 0x08 | SAMPLE | R/W | writing pushes bits [15:0] into the chain as a signed sample; reads the last sample |
| 0x0C | MWI | R | moving-window integral; **reading it clears READY** |
| 0x10 | BP | R | band-passed value, sign-extended |
| 0x14 | DERIV | R | derivative, sign-extended |
| 0x18 | SQUARE | R | squared derivative |
| 0x1C | COUNT | R | samples written since reset or CLEAR |

Offsets 0x20–0x3C answer SLVERR. Writes to read-only registers are ignored and
answered OKAY. Write strobes are not used: the processor writes whole words.

For each sample, the processor runs this sequence:

1. Write the sample to SAMPLE.
2. Wait for `irq` (with IRQ_EN set), or poll STATUS.READY. READY rises six clocks
   after the write response is raised.
3. Read BP, DERIV and SQUARE as needed. Read MWI last, which clears READY.
4. Run the decision step in software on MWI (and on BP and DERIV if required).

Run from a bus master that never stalls, the whole sequence takes about 24 clocks.
At 200 Hz a sample arrives every 500,000 clocks at 100 MHz, or every 50,000 at
10 MHz, so the accelerator is idle almost all the time.

Bus rules:

* The write-address and write-data channels are accepted independently.
* After a write, no new address or data is accepted until the write response has
  been taken.
* A read answers one clock after its address is accepted.
* Two assertions in `pt_axil_regs` check that a raised response stays unchanged
  until it is taken.

Reset is `aresetn`: synchronous and active low. It clears every register and delay
line.

## Files

`rtl/` (synthesizable):

* `pt_pkg.sv`: register offsets, flag bits, AXI response codes.
* `pt_lowpass.sv`, `pt_highpass.sv`, `pt_derivative.sv`, `pt_squarer.sv`, `pt_mwi.sv`:
  the five stages.
* `pt_filter_chain.sv`: the stages in series, plus the alignment copies.
* `pt_axil_regs.sv`: the AXI4-Lite slave and register file.
* `pt_accel.sv`: the top. It contains the register file and the chain; its ports
  are the AXI4-Lite slave and `irq`.

Top parameters are `DATA_W` (sample width, 16), `MWI_WIN` (integration window, 32,
a power of two) and `ADDR_W` (6). The stage widths follow from `DATA_W`.

`tb/` (simulation only):

* `pt_ref_pkg.sv`: a reference model that computes every stage in direct,
  non-recursive form (the FIR taps of the low-pass, an explicit 32-sample sum for
  the high-pass and the integrator). It also holds a synthetic ECG generator (P,
  QRS and T waves, baseline wander, noise) and the software decision step that the
  processor runs on MWI. That step is a simplified Pan-Tompkins decision: local
  maxima, a 200 ms refractory period, running signal and noise peak estimates, and
  a threshold a quarter of the way from noise to signal.
* `axil_if.sv`: an AXI4-Lite bundle with a master model. The model can stall the
  write-response and read-data channels at random.
* `tb_pt_lowpass.sv` … `tb_pt_mwi.sv`: one testbench per stage. Each uses impulse,
  step, extreme and random inputs, with idle gaps, and checks the one-clock latency,
  that outputs hold between samples, and CLEAR.
* `tb_pt_filter_chain.sv`: eight seconds of ECG and then random samples, against a
  scoreboard. It checks the latency and the alignment of all four outputs.
* `tb_pt_axil_regs.sv`: the register file on its own, with the testbench standing
  in for the chain. It covers every register, flag, the interrupt, CLEAR, SLVERR
  and bus stalls.
* `tb_pt_accel.sv`: the full accelerator at its default parameters, with the
  testbench acting as the processor. It streams 2,040 ECG samples at 75 beats per
  minute and checks every result. It then runs the decision step on MWI. After two
  seconds of learning, every beat must be detected exactly once and close after its
  R wave. The testbench also makes sure that the interrupt and polling paths,
  OVERRUN, CLEAR, SLVERR and both kinds of bus stall all happen, and it checks the
  six-clock write-to-READY latency.
* `tb_pt_accel_record.sv`: a 30-second record (6,000 samples) with an irregular
  rhythm (52 to 100 beats per minute) and QRS amplitudes from 0.6 to 1.2 of nominal.
  It runs through the full accelerator, with bus stalls throughout, and uses the
  same checks: bit-exact results, one detection per beat, no stray detections.

Every testbench ends by printing `TB_RESULT checks=N failures=M`. Each has a
watchdog.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```sh
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/pt_pkg.sv tb/pt_ref_pkg.sv tb/tb_pt_accel.sv --top-module tb_pt_accel
./obj_dir/Vtb_pt_accel
```

Replace `tb_pt_accel` with any other testbench name. The full accelerator test
runs in a few seconds.

Lint a module with:

```sh
verilator --lint-only -Wall -Irtl -y rtl rtl/pt_pkg.sv rtl/pt_accel.sv
```

## How this design follows the algorithm and where it departs from it

**Follows the algorithm:**

* Stage order: low-pass, high-pass, derivative, squaring, integration.
* The 15 Hz and 5 Hz cut-offs at a 200 Hz sample rate.
* The 32-sample integration window.
* Filters built from shifts and adds only.
* Only the filtering is in hardware, attached over AXI4-Lite; the decision stays
  in software.

**Choices of this design:**

* The difference equations are those of the classic Pan-Tompkins detector. They
  are not restated elsewhere, so their exact form here is a reconstruction. In
  particular, the high-pass is written in its stable form, as a delay minus a
  running sum.
* The low-pass is nominally a 15 Hz filter. Taken on its own, the classic
  equation used here has its −3 dB point near 11 Hz. Together with the high-pass
  it gives the usual 5–15 Hz QRS band.
* **Squaring is in hardware.** The accelerator is sometimes described as doing
  only the low-pass, high-pass, derivative and integration. The integrator is
  meaningful only on the squared slope, though, so the squarer sits in the chain.
  It is the one multiplier.
* All word lengths are this design's own: 16-bit samples and the per-stage
  scalings in the table above. Widths optimised for a specific ADC would be
  smaller.
* The register map, READY/OVERRUN, the read-to-clear of READY, CLEAR, COUNT, the
  interrupt and the extra result registers (BP, DERIV, SQUARE) are this design's
  own.
* The chain has no saturation, because it cannot overflow. It also has no rounding
  beyond truncating shifts.

**Not included:**

* The decision logic. It exists only as the testbenches' model of the processor's
  software, in simplified form: it has no search-back and no T-wave
  discrimination.
* The processor, the ADC and the clock generator.

## Verification status

All eight testbenches pass. For each module, a copy with one deliberate fault was
also simulated, and its testbench caught it. The faults were:

* a wrong delay tap in each filter;
* a wrong scaling in the squarer;
* a 31-sample window in the integrator;
* misaligned side copies in the chain;
* READY cleared by the wrong register;
* swapped outputs in the top.

The synthetic ECG is clean and regular. Detection quality on real, noisy
recordings has not been evaluated. Only the filtering arithmetic is checked
bit-exactly, against the reference model.
