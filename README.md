# Acoustic camera front end: 12 PDM microphones to a 160 x 120 steered-power map

An acoustic camera shows where sound comes from. A microphone array is
steered, one direction at a time, towards every pixel of an image, and the
power it receives from that direction becomes the pixel's value. This RTL is
the programmable-logic half of such a camera, built for a small SoC FPGA node
in a wireless sensor network. It takes the 1-bit PDM streams of 12 MEMS
microphones, filters them into audio, and beamforms them by delay-and-sum. For
every one of 160 x 120 orientations it delivers a steered response power (SRP)
value. With 80 clocks per orientation at 50 MHz, a full frame takes
30.72 ms, which is about 32 frames per second. Everything after that runs as
software on the host processor: turning the values into a heat map, scaling
it, finding regions of interest, compressing, and picking the radio mode.
That software is not part of this RTL.

The central idea is **decimating while beamforming**. The filter chain stops
at 130.208 kHz. The delay memories store every one of these samples, and the
beamformer reads them back with a stride of 4. The read therefore acts as the
last decimation stage, down to 32.55 kHz. The delays themselves keep the
finer 130.208 kHz resolution (7.68 us steps instead of 30.7 us). The cost is
four times more delay memory than a design that decimates before storing.

## Signal path and rates

| Stage | Module | Rate / size |
|---|---|---|
| PDM clock and capture, 6 lines x 2 microphones | `pdm_interface` | 50 MHz / 16 = 3.125 MHz |
| 4th-order CIC, decimate by 24 | `cic_decimator` | 3.125 MHz -> 130.208 kHz |
| DC removal (subtract a 128-sample moving average) | `moving_average_filter` | 130.208 kHz |
| 24-tap low-pass FIR, serial | `fir_filter` | 130.208 kHz, no decimation |
| one chain per microphone (x12) | `filter_chain`, `filter_stage` | |
| per-microphone circular buffer, 512 x 32 bit | `delay_memory` | |
| delay table, 19200 orientations x 12 x 5 bit | `delay_rom` | |
| delayed, stride-4 reads, sub-array gating | `delay_decimation_stage` | 64 reads per orientation |
| sub-array sums, beam sum, sum of squares | `detection_stage` | 1 SRP per orientation |
| sequencing, fill wait, stall, configuration | `control_unit` | 80 clocks per orientation |
| output buffer for the host link | `sync_fifo` | 33 bit x 512 |
| all of the above | `acoustic_camera_top` | |

There is one clock domain, the 50 MHz system clock. The PDM rate exists only
as an enable strobe, produced once per PDM period by `pdm_interface`.

## Microphone array

There are two concentric rings. Sub-array 1 has 4 microphones on a 40.64 mm
diameter (indices 0-3). Sub-array 2 has 8 microphones on an 81.28 mm diameter
(indices 4-11). The inner ring is turned 22.5 degrees against the outer one.
This gives a shortest microphone spacing of 23.20 mm and a longest of
81.28 mm. The positions, in micrometres, are in `ac_pkg` (`MIC_X_UM`,
`MIC_Y_UM`).

The two microphones of a pair share one clock line and one data line. In this
design the even microphone drives the data line while the PDM clock is high,
and the odd one while it is low. Line `l` carries microphones `2l` and `2l+1`.
If your board uses the other convention, swap the two assignments in
`pdm_interface`.

## Filter chain and number format

Samples are signed 32-bit fixed point with 16 fractional bits (Q16.16).

- **CIC.** It has 4 integrators at the PDM rate and 4 combs at the decimated
  rate, in 21-bit wrapping registers. PDM bits enter as +1/-1. The result is
  sign-extended but not rescaled, so a full-scale PDM input reads as
  24^4 / 2^16 = 5.06.
- **DC removal.** The output is the input minus the mean of the last 128
  samples. Before the window has filled, the missing samples count as zero.
  The average has its first null at 130208 / 128 = 1.017 kHz, so from about
  1 kHz up, which is the lowest frequency the camera is designed for, the
  tone passes. Above the null, the average's sidelobes leave a ripple of up
  to about +-22 % that dies out towards higher frequencies.
- **Serial FIR.** It has 24 taps with Q1.15 coefficients and computes one
  multiply-accumulate per PDM strobe. Exactly 24 strobes separate two inputs,
  so the tap count is tied to the CIC decimation factor. The coefficients are
  a Hamming-windowed sinc with cut-off 16.275 kHz at 130.208 kHz, normalised
  to unity DC gain:
  `h[n] = round(32768 * w[n] * sinc(2 fc (n - 11.5)) / sum)`, with
  `w[n] = 0.54 - 0.46 cos(2 pi n / 23)`. They are in `ac_pkg::FIR_COEFS`.
  The result is rounded, shifted back to Q16.16 and saturated.

## Delay table

Each orientation is one pixel of a W_PIX x H_PIX grid of points on the plane
z = 1 in front of the array. The grid spans a 51 degree field of view
horizontally, with square pixels and a point at each pixel centre. Each point
is normalised to a unit vector `u`. The delay of microphone `m` is

    d[o][m] = 8 + round( (u . p_m) * 130208.33 / 343 )       (samples)

The largest array offset for this field of view is 8 samples, so all delays
fall in 0..16 and fit in 5 bits. Orientations are stored row by row
(`o = row * W_PIX + col`). Row 0 is the most negative y and column 0 the most
negative x in the array's coordinate frame.

The table is filled by an `initial` loop with real arithmetic, so it is
computed when the design is elaborated. Changing the resolution means
changing `W_PIX`/`H_PIX` and rebuilding. At 160 x 120 the table is
19200 x 60 bits = 1.15 Mbit.

## One orientation: the 80-clock slot

`control_unit` gives every orientation a fixed slot of `ORIENT_CYCLES` = 80
clocks:

| Phase | Action |
|---|---|
| 0 | Wait until `cfg_run` is high, the memories are filled and the FIFO has room. Then freeze `rd_base` = newest sample. The delay table already shows this orientation. |
| 2 .. 65 | Read k = 0..63 from all 12 memories at `rd_base - d_m - 4k`. |
| 3 .. 66 | Aligned samples enter `detection_stage`. |
| 70 | The SRP is written to the FIFO, with the end-of-frame flag on orientation N_O-1. |
| 71 .. 79 | Idle. The slot length is fixed at 80 so the timing stays the same whatever the pipeline depth. |

A new filtered sample arrives only every 384 clocks. The read window covers
284 samples and the buffer holds 512, so a write can never land inside the
window being read.

- **Fill wait.** After reset, and after every configuration change,
  beamforming waits until 284 new samples are in the memories. That is
  4 x 63 + 32 samples, about 2.2 ms.
- **Stall.** If the host does not drain the FIFO, the beamformer waits at
  phase 0 (`stat_stall` pulses once per waiting clock). No value is lost.
- **Sub-array configuration.** `cfg_subarray_en` bit 0 switches the inner
  ring, bit 1 the outer ring. The setting is taken when orientation 0 is
  about to start. A disabled sub-array's memories neither write nor read,
  and its samples count as zero in the sums. Memories that were off hold
  stale data, so a change restarts the fill wait (`stat_refill`).

SRP = sum over k of (sum over m of x_m)^2, kept in full precision (78 bits),
then shifted right by `OUT_SHIFT` = 24 and saturated to 32 bits. A 0.4
full-scale tone on all 12 microphones gives a peak of about 5 x 10^6.

## Host interface

The host reads `fifo_dout` and `fifo_last` one clock after asserting
`fifo_rd_en` while `fifo_empty` is low. A frame is the W_PIX x H_PIX values,
in orientation order, ending with `fifo_last` = 1. At 160 x 120 the stream
is 19200 words per 30.72 ms, about 2.5 MB/s.

## How this relates to the published architecture

These parts follow the published architecture:

- the 12-microphone two-ring array and its pairing on 6 lines;
- F_s = 3.125 MHz, the CIC order 4 and decimation 24, the moving-average DC
  removal, and a serial 24-tap FIR with 16-bit coefficients;
- Q16.16 samples between the filters;
- decimation by 4 performed by the stride of the memory reads;
- per-sub-array memories that can be switched off;
- 64 samples per SRP, 80 clocks per orientation at 50 MHz, and a 160 x 120
  main resolution;
- a grid of orientations in a 51 degree field of view at z = 1, normalised to
  unit vectors.

These are this design's own choices, where no detail was available:

- the single clock domain and the /16 PDM divider;
- which microphone of a pair uses which clock half;
- the CIC output scaling;
- the moving-average length (128);
- the FIR coefficient values;
- the delay-memory depth (512);
- the speed of sound (343 m/s), the ring rotation, pixel centring and
  row-major order;
- the SRP as a sum of squares, with its output scaling;
- the schedule inside the 80-clock slot;
- configuration at frame start with refill;
- FIFO back-pressure and the end-of-frame flag.

Two further differences concern the evaluation rather than the logic. The
published build keeps the delay table in LUTs. Here `delay_rom` is a plain
registered ROM, so the synthesis tool chooses where it goes. As block RAM it
would take about 64 of the 18 kbit blocks. The memories and the FIFO add 13
more. A generic (technology-independent) Yosys synthesis of the top gives
about 14,500 flip-flop bits and 1.27 Mbit of memory: the delay table, twelve
16 kbit delay memories, the FIFO and the filter windows. The published
Zynq-7020 build reported 29,447 registers, 19,538 LUTs, 33 block RAMs and
28 DSP slices; those numbers depend on mapping choices not made here. The simulated source is a far-field plane wave, while the published
heat maps used a loudspeaker about half a metre from the array.

The FIR is described in one place as order 23 and elsewhere as order 24. This
design uses 24 taps (order 23), the most a one-product-per-PDM-sample serial
filter can do with a decimation of 24.

## Simulating

Every testbench is self-checking and prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl -y tb \
        rtl/ac_pkg.sv tb/tb_acoustic_camera_top.sv --top-module tb_acoustic_camera_top
    ./obj_dir/Vtb_acoustic_camera_top

Replace the testbench name to run any other. Each block has one:

| Testbench | What it checks |
|---|---|
| `tb_cic_decimator`, `tb_moving_average_filter`, `tb_fir_filter` | bit-exact against textbook models (boxcar cascade, windowed mean, direct convolution); latency and rate |
| `tb_filter_chain` | the whole chain, bit-exact, on a sigma-delta coded tone |
| `tb_filter_stage` | per-microphone gain |
| `tb_delay_rom` | both tables against a polar-form reference |
| `tb_delay_decimation_stage`, `tb_detection_stage`, `tb_control_unit`, `tb_sync_fifo` | addressing, arithmetic and sequencing rules of their block |
| `tb_acoustic_camera_top` | end to end at 8 x 6 with a 16-word FIFO: the peak lands on the source pixel, 80-clock spacing, stall without loss, a sub-array mode switch with refill and a power drop of about (4/12)^2 |
| `tb_acoustic_camera_full` | one full 160 x 120 frame with all defaults, about 1.6 M clocks |
| `tb_acoustic_camera_resolutions` | rebuilds at 40 x 30, 80 x 60 and 320 x 240 (helper `resolution_run`), one frame each: value count, W x H x 80 clocks, peak near the source |

All of them pass. In the full frame the source sits at pixel (120, 40) and
the peak came out at (115, 32). The frame took 1,535,991 clocks. The other
grids gave 95,991 clocks (1.92 ms), 383,991 clocks (7.68 ms) and 6,143,991
clocks (122.88 ms). In each, the peak was within 10 % of the image width of the
source.

`tb/pdm_mic_array_model.sv` is a behavioural stand-in for the microphones. It
has one second-order sigma-delta modulator per microphone, fed with a plane
wave from a chosen direction.

## Limits

- The beam is broad. At 4 kHz the 81 mm aperture is under one wavelength, so
  neighbouring pixels differ little in power. Many neighbouring pixels also
  share the same set of integer delays.
- The delay table uses real arithmetic in an `initial` loop, which the
  elaborator runs as constant evaluation. Some front ends cap the number of
  evaluation steps; slang's default cap covers about 27,000 orientations
  with the loop as written. That is enough for 160 x 120 but not for
  320 x 240. Raise the cap, or generate the contents offline from the
  formula above.
- Resolutions other than 160 x 120 (40 x 30, 80 x 60, 320 x 240) need a
  rebuild with other `W_PIX`/`H_PIX`; the resolution cannot be switched at
  run time. At 320 x 240 the table (4.6 Mbit) no longer fits the block RAM
  of a Zynq-7020-class device.
- At 40 x 30 a frame lasts 1.92 ms, only just above half of the 1.97 ms
  span of PDM samples one orientation looks at. Consecutive frames then
  share part of their input.
