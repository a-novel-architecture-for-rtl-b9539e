# Reconfigurable DSP processor: one datapath for FIR, low-pass, high-pass and FFT

Four common signal-processing jobs — a 4-tap FIR filter, a first-order low-pass, a
first-order high-pass and a 4-point FFT — are built from the same few parts: multipliers,
adders, subtractors and unit delays. This design keeps one set of those parts and uses a
handful of 2:1 multiplexers and demultiplexers to re-wire it for each job. A 2-bit
application code sets the switches. The union of the four datapaths needs only four
multipliers, three delays, three adders and two subtractors. A separate 4-point FFT block
hangs off one output of the input demultiplexer.

The sizes follow a small 4-bit prototype: samples and FIR taps are 4-bit two's complement.
The design runs at one sample per enabled clock. It was aimed at a 50 MHz FPGA clock.

Two realisations are provided and run side by side in the top level:

* **`fu_processor`**: the shared-functional-unit datapath described above. This is the
  main design.
* **`bbu_processor`**: the straightforward arrangement it is derived from. A 1:4
  demultiplexer feeds four complete engines (`fir4`, `lpf`, `hpf`, `fft_block`), and a
  4:1 multiplexer picks one result.

Started from reset and held in one application, the two produce identical outputs. So each
can serve as a reference for the other.

## The four applications

| code | application | function |
|---|---|---|
| `00` | FIR | y(n) = h0·x(n) + h1·x(n-1) + h2·x(n-2) + h3·x(n-3) |
| `01` | low-pass (LPF) | y(n) = (x(n) + x(n-1) − n·y(n-1)) / m |
| `10` | high-pass (HPF) | y(n) = (x(n) − x(n-1) − b·y(n-1)) / a |
| `11` | FFT | X(k) = Σ x(i)·e^(−j2πki/4) over frames of four samples |

The two IIR filters are digital versions of an RC low-pass and a CR high-pass. They come
from the bilinear transform s = (2/T)(z−1)/(z+1), with sample period T:

* low-pass: m = 1 + 2RC/T and n = 1 − 2RC/T;
* high-pass: P = T/(2RC), a = P + 1 and b = P − 1.

The hardware does not divide. You supply the reciprocals 1/m and 1/a as coefficients.
The datapath forms the difference first, subtracts the fed-back product, then multiplies
by the reciprocal. That order matches the filter diagrams the design follows.

Coefficient ports use the names of the shared datapath:

| port | low-pass | high-pass |
|---|---|---|
| `inv_k1` | 1/m | – |
| `m1` | n | – |
| `inv_k2` | – | 1/a |
| `m2` | – | b |

Worked example: RC/T = 2 gives m = 5 and n = −3. Use `inv_k1` = round(256/5) = 51 and
`m1` = −768.

The FFT is the radix-2 decimation-in-time kind. The first stage has two butterflies with
twiddle w(0) = 1, pairing x(0) with x(2) and x(1) with x(3). In the second stage, a w(0)
butterfly combines the two sums into X(0) and X(2). A w(1) = −j butterfly combines the two
differences into X(1) and X(3). Every twiddle is 1 or −j, so the transform is exact in
integers.

## How the shared datapath is switched

Two unit delays on the input line always hold x1 = x(n-1) and x2 = x(n-2). Everything
else depends on the switch settings, which `ctrl_decoder` derives from the application
code:

| switch | what it chooses | FIR | LPF | HPF | FFT |
|---|---|---|---|---|---|
| DM1 (s6, 1:4) | where x(n) goes | ×h0 | M1 | subtractor | FFT block |
| M1 (s1) | adder input A: h0·x(n) \| x(n) | 0 | 1 | – | – |
| M2 (s2) | adder input B: h1·x1 \| x1 from DM3 | 0 | 1 | – | – |
| DM2 (s7) | adder result to: FIR output adder \| M3 | 0 | 1 | – | – |
| DM3 (s8) | x1 to: M2 \| subtractor x(n) − x1 | – | 0 | 1 | – |
| M3 (s3) | filter input: sum \| difference | – | 0 | 1 | – |
| M4 (s4) | shared multiplier input: filter difference \| x2 | 1 | 0 | 0 | – |
| M5 (s5) | third delay input: y(n) \| x2 | 1 | 0 | 0 | – |
| DM4 (s9) | third-delay product to: FIR output adder \| feedback subtractor | 0 | 1 | 1 | – |

"–" marks a don't-care, which the decoder drives as 0.

**FIR.** The two front multipliers make h0·x(n) and h1·x1, and the left adder sums them.
M4 routes x2 into the shared multiplier, which then uses tap h2. M5 feeds x2 into the
third delay, so that delay holds x(n-3), and its multiplier uses tap h3. The two output
adders on the right total the four products.

**Low-pass.** M1 and M2 pass x(n) and x1 unmultiplied, so the left adder forms
x(n) + x1. The third delay stores the filter output y(n), and its multiplier (coefficient
n) produces n·y(n-1). DM4 sends that product back to the feedback subtractor. The
subtractor's result goes through M4 to the shared multiplier, which scales it by 1/m.

**High-pass.** DM1 and DM3 steer x(n) and x1 into the left subtractor. M3 selects that
difference instead of the sum. The rest is the low-pass path with coefficients 1/a and b.

The shared multipliers take their coefficient from the same selects: s4 picks the FIR tap,
and otherwise s3 picks the high-pass pair over the low-pass pair.

**What crosses a switch.** The third delay is shared. After a FIR sample it holds
x(n-3); after a filter sample it holds y(n); in FFT mode it loads 0. So for up to three
samples after a change of application, `fu_processor` output still depends on samples
taken in the previous mode, and an IIR filter starts from whatever state the delay held.
`bbu_processor` behaves differently: its engines keep their own state, and an engine that
is not selected gets no sample strobe. When you switch back to it, it resumes where it
stopped. If you need a clean start in the shared datapath, pulse `rst_n` or feed three
samples before using the output.

## Numbers and timing

* **Samples.** `x` is DW = 4 bits, two's complement.
* **FIR.** Taps `h[0..3]` are CW = 4-bit signed integers. The FIR output is exact, at
  DW+CW+2 = 10 bits.
* **IIR coefficients.** KW = 16 bits, signed, with KF = 8 fraction bits, so the range is
  about ±128 with a resolution of 1/256. That range admits the large negative n and b of
  filters whose RC is many sample periods long.
* **IIR arithmetic.** The datapath computes (x(n) ± x(n-1))·2^KF − c·y(n-1) at full
  precision. It multiplies that by the reciprocal coefficient and adds one half. It then
  shifts right by 2·KF, which rounds to the nearest integer with halves rounded up.
  Finally it saturates the result to DW bits. The saturated value is both the output and
  the stored y(n-1), so the filter state is 4 bits.
* **Dead band.** A 4-bit state leaves a dead band: a slow filter may settle a level or two
  away from its ideal steady state. For example, a high-pass with RC/T = 4 holds at ±2 on
  a constant input instead of decaying to 0. Widen DW to shrink it.
* **FFT outputs.** Bins are DW+2 = 6 bits per component, exact. With a real input,
  Im X(0) and Im X(2) are always 0, so synthesis removes those bits.
* **Timing.**
  * A sample is taken on a rising `clk` edge while `en` is high.
  * Filter and FIR outputs are combinational in the current `x`: zero latency, one sample
    per enabled cycle.
  * The FFT block gathers frames of four enabled samples, aligned from reset. On the edge
    that takes the fourth sample it registers all four bins, and `frame_valid` pulses in
    the next cycle.
  * While the next frame is being gathered, the serial output shows bin k of the previous
    frame during sample k (`y_idx` = k). That is a latency of one frame.
  * `y_valid` rises after the first frame.
* **Reset.** `rst_n` is active low and synchronous. It clears every delay, the frame
  counter and the bins.

## Top-level interface (`reconfig_dsp_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n`, `en` | in | 1 | clock, synchronous active-low reset, sample strobe |
| `mode` | in | 2 | application code (`dsp_pkg::dsp_mode_e`) |
| `x` | in | DW | input sample (from the input converter) |
| `h[4]` | in | CW each | FIR taps |
| `inv_k1`, `m1`, `inv_k2`, `m2` | in | KW each | IIR coefficients (see above) |
| `fu_fir_out`, `fu_fir_valid` | out | DW+CW+2, 1 | FIR result of the shared datapath, valid in FIR mode |
| `fu_filt_out`, `fu_filt_valid` | out | DW, 1 | LPF/HPF result, valid in LPF or HPF mode |
| `fu_fft_bin_re/im[4]`, `fu_fft_frame_valid` | out | DW+2 each, 1 | bins of the last FFT frame, new-frame pulse |
| `fu_fft_re/im`, `fu_fft_idx`, `fu_fft_valid` | out | DW+2, 2, 1 | bins streamed one per sample |
| `bbu_y_re`, `bbu_y_im`, `bbu_y_valid` | out | DW+CW+2 each, 1 | y(n) of the block-level processor (to the output converter) |

Parameters `DW`, `CW`, `KW` and `KF` default to 4, 4, 16 and 8 (from `dsp_pkg`). The FFT
twiddle format assumes exactly four points.

## Files

| file | contents |
|---|---|
| `rtl/dsp_pkg.sv` | default sizes, application code enum, switch-setting struct |
| `rtl/ctrl_decoder.sv` | application code → switch settings (table above) |
| `rtl/fu_processor.sv` | shared-unit datapath with its decoder and FFT block |
| `rtl/bbu_processor.sv` | demultiplexer, four engines, multiplexer |
| `rtl/fir4.sv`, `rtl/lpf.sv`, `rtl/hpf.sv` | stand-alone filter engines |
| `rtl/fft_butterfly.sv`, `rtl/fft4_core.sv`, `rtl/fft_block.sv` | butterfly, combinational 4-point FFT, streaming wrapper |
| `rtl/reconfig_dsp_top.sv` | top level, both realisations side by side |
| `tb/tb_ref_pkg.sv` | integer reference models: FIR sum, IIR recurrence, direct DFT, switch table, processor models |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

Every testbench ends by printing `TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_reconfig_dsp_top` runs 20 000 samples through the top level at its default sizes.
  The application changes randomly, and the input is either random samples or a square
  wave. It checks every output against the models. It also counts each mechanism and
  fails if one never happens: every application, a switch into every application,
  shared-delay carry-over, engine resume, saturation, FFT frames and stream, strobe gaps.
* `tb_workloads` runs each application on a textbook stimulus through the top level at
  its default sizes, checked against closed-form results:
  * FIR impulse response;
  * FFT of DC, alternating, cosine and sine frames;
  * low-pass step response;
  * high-pass response to a square pulse train.
* `tb_fu_processor` and `tb_bbu_processor` check the two realisations on their own.
* The leaf testbenches check the butterfly against complex arithmetic, the FFT core
  against a direct DFT, and the filters against the recurrence. The filter testbenches
  also test steady-state behaviour for several RC/T ratios.

## Simulating

With Verilator 5 (any simulator with SystemVerilog classes will do):

```sh
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/dsp_pkg.sv tb/tb_ref_pkg.sv tb/tb_reconfig_dsp_top.sv \
    --top-module tb_reconfig_dsp_top -o sim
./obj_dir/sim
```

Substitute any other `tb_<name>.sv` to run that block's test. Every run takes a few
seconds at most. To change a size, override the parameters on `reconfig_dsp_top`. The
reference models take DW and KF as arguments, so the testbenches only need their
localparams changed.

## Where this design makes its own choices

The published description gives the block diagrams, the filter equations and the
switch-setting table. It does not give word formats, timing or reset. These parts are
choices of this design:

* **Switch inputs.** Which input of each 2:1 switch is "0" and which is "1" was chosen so
  that the published settings produce each function.
* **Coefficient selection.** How the shared multipliers pick between h2, 1/m and 1/a
  (and between h3, n and b) is this design's choice.
* **FIR adders.** The FIR output is formed by two adders after the shared multiplier.
* **Switch counts.** The published resource summary counts seven 2:1 multiplexers and a
  single 2:1 demultiplexer. The datapath drawing it accompanies has five multiplexers and
  three 2:1 demultiplexers, and this design follows the drawing.
* **FFT output order.** The published FFT schematic labels the outputs of its upper
  second-stage butterfly X(0), X(1). With the pairing it draws, that butterfly produces
  X(0) and X(2), and the outputs here are in natural DFT order.
* **Arithmetic.** All number formats, the rounding and saturation, and the zero-latency
  filter timing are this design's choices. So are the FFT framing, the strobe gating of
  unselected engines and the complex `y(n)` of the block-level processor.
* **Outside this design.** The analog parts of the signal chain (input and output
  converters) are not part of the RTL. `x` and `bbu_y_*` are their digital sides.

## Size

The shared datapath uses 4 multipliers and 12 delay flip-flops (three 4-bit delays). That
matches the published count for the combined architecture: 4 multipliers and 12
registers. The FFT block adds its own butterflies and frame registers: 3 samples of
buffer, 4 complex bins and control.
