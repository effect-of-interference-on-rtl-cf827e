# Adaptive delta modulation codecs for television video

A delta modulator codes a signal with one bit per sample: the bit says only
whether the signal is above or below a running estimate, and both ends move
the estimate up or down by a step. A fixed step either blurs sharp edges
(the estimate cannot keep up: slope overload) or makes flat areas noisy (it
overshoots: granular noise). The *adaptive* delta modulator (ADM) here
changes its step with every bit: it grows the step by half when two
successive bits agree and halves it when they disagree. A television signal
(4 MHz composite video, sync pulses included) then codes at 8 to 20 Mb/s
with no word framing and no separate sync: the receiver is the same
feedback loop as the transmitter's, and the sync pulses come out of it as
part of the video.

This RTL holds two codecs from the same 1977 study of delta-modulated
video:

* a **one-dimensional ADM** (one bit per sample) that codes the video
  signal along each line, and
* a **two-dimensional intraframe ADM** (two bits per pixel) that, for
  every pixel, predicts either from the pixel to its left or the pixel
  above, whichever is closer, and sends the choice as the second bit.

Both are written as synchronous digital logic on sampled video codes. The
original hardware was built from ECL parts with an analog comparator and
a D/A converter in the loop; here the video arrives as a 7-bit sample and
the comparison is digital. A D/A converter and the receiver's output
filter are included as behavioural models.

## The step rule

Everything in both codecs comes down to one update, done once per sample.
With delta bits `E` (logic 1 means +1, logic 0 means -1), step `Y` and
estimate `X`:

```
E[k+1] = sgn(S[k] - X[k])                       the transmitted bit
|Y[k]| = 2*Ymin                  if |Y[k-1]| < 2*Ymin
       = |Y[k-1]| * (1 + 1/2)    if E[k] == E[k-1]   (grow)
       = |Y[k-1]| * (1 - 1/2)    if E[k] != E[k-1]   (shrink)
         then at most Ymax
sign(Y[k]) = E[k]
X[k]   = X[k-1] + Y[k]
```

`Ymin` is 1/128 and `Ymax` 1/8 of the peak-to-peak video range. With a
7-bit estimate (0..127 spans peak-to-peak) that is `Ymin = 1` and
`Ymax = 16` codes.

Points worth knowing before changing the arithmetic:

* **Only the step magnitude is stored.** Because `|E[k] + E[k-1]/2|` is
  never below 1/2, the sign of `Y[k]` is always `E[k]`. So the step
  register holds `|Y|`, one adder/subtractor forms `|Y| +/- |Y|/2` with
  the XOR of the two bits as its add/subtract control
  (`adm_step_adapter`), and a second adder/subtractor adds or subtracts
  `|Y|` to the estimate under control of `E[k]` (`adm_estimator`).
* **Rounding.** `|Y|/2` is a right shift, so shrinking gives
  `|Y| - floor(|Y|/2)` (3 becomes 2, 5 becomes 3). Growing gives
  `|Y| + floor(|Y|/2)` (2, 3, 4, 6, 9, 13, then 16 by the clamp).
* **The floor.** A shrinking step falls to 1 (below `2*Ymin`), and the
  next sample jumps it back to 2. In a flat area the estimate therefore
  dithers by 1 to 2 codes around the input; the encoder testbench checks
  that every flat stretch ends within `2*Ymin` of the input.
* **Limits.** The estimate saturates at 0 and 127 rather than wrapping.
  Saturation also matters for channel errors (below).
* **No leak.** The estimate register feeds its adder directly. There is no
  decay factor on the previous estimate.

## One-dimensional codec

`adm_loop` is the feedback loop with the four registers of the original
block diagram:

| register | holds    | next value |
|----------|----------|------------|
| D1       | `E[k]`   | the incoming bit `E[k+1]` |
| D2       | `E[k-1]` | D1 |
| \|D\|    | `|Y[k-1]|` | `|Y[k]|` |
| D        | `X[k-1]` | `X[k]` |

`|Y[k]|` and `X[k]` are combinational from these registers, so one sample
takes one clock (with `en` high). There is no pipeline. The encoder's
critical path runs from the registers through the step adder, the
estimate adder and the comparator back to D1.

* `adm_encoder` compares the sample `s_k` with `X[k]` (`s_k >= X[k]`
  gives 1) and feeds that bit into its loop. The transmitted bit
  `bit_out` is D1. `x_test` is the estimate, the encoder's copy of what the
  receiver rebuilds (the test output of the original unit). `bit_valid`
  rises one sample after reset and stays high.
* `adm_decoder` is only the loop, driven by received bits. If it is reset
  together with the encoder and takes `bit_out`/`bit_valid`, its `x_out`
  equals the encoder's `x_test` exactly one clock later. The end-to-end
  test checks this for every sample.

**Channel errors.** A flipped bit moves the receiver's estimate away from
the transmitter's and also changes its step history. Because later bits
are the same at both ends, the two states come back together once the
estimate at both ends is pinned at a limit (a white or black stretch) and
the step registers have seen the same bits. In the end-to-end test, two
flipped bits put the receiver out of step for 157 and 3 samples. No
special circuit is involved: this is a property of the loop with
saturating arithmetic.

## Two-dimensional codec

The two-dimensional codec runs two delta modulators side by side on each
pixel:

* the **horizontal** one continues from the state of the previous pixel of
  the line (kept in registers);
* the **vertical** one continues from the state of the pixel above (kept
  in `line_store`, one word per column).

A pixel's state is its reconstructed value, the step magnitude that
produced it and the delta bit that produced it (7 + 5 + 1 = 13 bits).
Each modulator compares the pixel with its own estimate and forms its
own bit and next state (`adm_update`, the same step rule and estimate
update as above). `adm2d_decision` picks the vertical modulator when its
estimate is strictly closer to the pixel, and the horizontal one
otherwise. This is "look-ahead": the encoder sees the pixel before it
chooses, so the choice must be sent. The chosen bit and the direction go
out as two bits per pixel. The chosen new state becomes both the
horizontal starting point for the next pixel and the word written back to
the line memory for the pixel below.

`adm2d_decoder` mirrors this. The direction bit selects the left or upper
state, the delta bit is applied with `adm_update`, and the result is
stored in the same two places. So the receiver's pixels equal the
encoder's reconstruction (`recon`) one clock later.

Edges and timing:

* `sol` marks the first pixel of a line and `sof` (with `sol`) the first
  pixel of a frame. The symbol (`adm2d_sym_t`) carries both to the
  receiver.
* The first line of a frame is coded horizontally only. The first pixel
  of every later line is coded vertically only. The first pixel of a frame
  starts from the all-zero state.
* Because of these rules, an error stays within its frame. The next
  frame's first line does not read the line memory and rewrites it
  completely. The end-to-end test flips one delta bit in a frame: 20
  pixels of that frame come out wrong, and the next frame is exact.
* The line memory is read asynchronously and written at the clock edge
  (read-before-write at the same column). `LINE_LEN` is 512 words. At 16
  Mb/s and 2 bits per pixel, a 63.5 us NTSC line holds about 508 pixels.
  At the full 20 Mb/s it would need 635, so set `LINE_LEN = 1024` for that
  rate. An assertion flags lines longer than the memory.

The original report found the two codecs subjectively equal at 16 Mb/s.
The two-dimensional one codes each frame slightly differently, which shows
as flicker on edges at 30 frames per second. `tb_codec_compare_16mbps` runs
both links at that channel rate on the same synthetic 16-line picture:
1016 one-bit samples per line against 508 two-bit pixels. It prints each
codec's mean absolute error (2.9 codes for 1-D and 1.5 codes for 2-D on
that picture). This is a numeric error, not a judgement of picture
quality.

## Top level

`adm_video_system` places both links side by side on one clock:

* 1-D transmitter: `s_en`, `s_k` in; `tx1_bit`, `tx1_valid`, the
  estimate `tx1_test` and its voltage `tx1_test_v` out.
* 1-D receiver: `rx1_bit`, `rx1_valid` in; `rx1_video`, its voltage
  `rx1_video_v`, and `rx1_video_filt` (after the output filter model) out.
* 2-D transmitter: `pix_valid`, `pix`, `pix_sol`, `pix_sof` in; the symbol
  `tx2` and `tx2_recon` out.
* 2-D receiver: symbol `rx2` in; `rx2_pix_valid`, `rx2_pix` out.

The channels are deliberately outside the top, so a channel model can put
bit errors (interference) between each transmitter and receiver. In the
original equipment the receiver's clock comes from a bit synchronizer, and
the clock source is bench equipment. Neither is part of this RTL.

Behavioural models (simulation only, not synthesizable):

* `dac_model`: an ideal linear D/A, `vout = code * VPP / 2**VIDEO_W`, with
  1 V peak-to-peak.
* `butterworth_lpf_model`: the receiver's 4 MHz four-pole Butterworth
  output filter. It is modelled in discrete time at the sample rate `FS_HZ`
  (16 MHz default) as two bilinear-transform biquads, pre-warped to be
  -3 dB at 4 MHz. Its testbench measures unit DC gain, 0.707 at 4 MHz and
  full rejection at half the sample rate.

## Parameters

| parameter  | default | meaning |
|------------|---------|---------|
| `VIDEO_W`  | 7       | width of samples and estimates; `Ymin` is one code |
| `YMIN`     | 1       | smallest step, 1/128 of peak-to-peak |
| `YMAX`     | 16      | largest step, 1/8 of peak-to-peak |
| `LINE_LEN` | 512     | line memory words of the 2-D codec |
| `FS_HZ`    | 16e6    | sample rate assumed by the filter model |

The defaults are in `adm_pkg`, together with the `dir_e` direction type
and the `adm2d_sym_t` channel symbol. If `VIDEO_W` changes, scale `YMIN`
and `YMAX` with it (`2**VIDEO_W / 128` and `2**VIDEO_W / 8`) to keep the
same step rule.

## How far to trust it, and where it departs from the original

Taken from the source design: the step rule with its 1.5x/0.5x factors,
`2*Ymin` floor and `Ymax` clamp, the step limits as fractions of
peak-to-peak, the four-register loop, the decoder as the encoder's loop,
one bit per sample for the 1-D codec, two delta modulators with a
closest-estimate decision and two bits per pixel for the 2-D codec, a
one-line memory, and the 4 MHz four-pole output filter.

Choices made here, where the source says nothing or only gives the
function:

* The video is a digital 7-bit sample, and the compare, D/A and comparator
  are digital or modelled. The original has seven estimate flip-flops
  driving its D/A, which is where the 7-bit width comes from. It shows
  only four step-register flip-flops; here the step register has 5 bits
  so that it holds `Ymax = 16`.
* `sgn(0)` is +1, bit value 1 is +1, and the direction bit 1 is vertical.
* Rounding of the half step (right shift); saturation of the estimate;
  reset of every register to zero.
* The `en`/`bit_valid` strobes, which let encoder and decoder start in
  step after reset.
* For the 2-D codec: what a line-memory word holds, the edge rules, ties
  going horizontal, the chosen state being shared by both predictors, and
  line/frame marks travelling with the symbols. The original makes its
  decision with analog comparators and three D/A converters. This design
  compares absolute code differences.

Not built: the simplified two-dimensional coder without look-ahead, which
was still under construction and whose direction rule is not described;
the bit synchronizer; and the analog comparator as an analog part.

## Simulating

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. Models
for the checks are in `tb/adm_ref_pkg.sv`: the step rule and estimate
update are written from the equations with plain integers, plus a class
that models the whole 2-D codec. For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/adm_pkg.sv tb/tb_adm_video_system.sv --top-module tb_adm_video_system
./obj_dir/Vtb_adm_video_system
```

`tb_adm_video_system` runs the top at its default sizes. It sends eight
512-sample lines through the 1-D link with two channel errors and three
12-line frames of 512 pixels through the 2-D link with one error. It
counts step growth, shrink, reset and clamp, estimate saturation at both
limits, error recovery, and both directions, including the forced edge
choices. It fails if any of these never happened. `tb_codec_compare_16mbps`
also runs the top at its default sizes (see above). The block testbenches
override parameters only to use shorter lines.

| file | contents |
|------|----------|
| `rtl/adm_pkg.sv` | default sizes, `dir_e`, `adm2d_sym_t` |
| `rtl/adm_step_adapter.sv` | step rule |
| `rtl/adm_estimator.sv` | estimate add/subtract with saturation |
| `rtl/adm_loop.sv` | four-register feedback loop |
| `rtl/adm_encoder.sv`, `rtl/adm_decoder.sv` | 1-D codec |
| `rtl/adm_update.sv` | one combinational step for the 2-D codec |
| `rtl/line_store.sv` | one-line memory |
| `rtl/adm2d_decision.sv` | direction decision |
| `rtl/adm2d_encoder.sv`, `rtl/adm2d_decoder.sv` | 2-D codec |
| `rtl/dac_model.sv`, `rtl/butterworth_lpf_model.sv` | behavioural analog models |
| `rtl/adm_video_system.sv` | top level |
