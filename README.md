# Two-stage oversampled polyphase filter bank for a very coarse channelizer

This RTL splits a complex sub-band sampled at 2.0 Gs/s into eight frequency
slices of 200 MHz each. The sub-band holds 1.6 GHz of usable bandwidth. Each
slice is oversampled by 10/9 (222.2 Ms/s complex), so a slice keeps a guard
band and its edges can later be stitched to its neighbours without gaps.

Twenty such filter banks, with their input buffers and two crossbar switches,
form a strawman channelizer FPGA: 32 GHz of bandwidth in, 160 slices out.

The arithmetic is in two stages:

1. **A 10-channel polyphase filter bank** runs on the input up-sampled by two.
   Its channels are 200 MHz apart, and it decimates by 9 to 444.4 Ms/s per
   channel.
2. **A half-band filter per slice** decimates by a further two, to
   222.2 Ms/s.

## Rates and frames

The datapath runs at 450 MHz. One input frame is five complex samples of
6+6 bits (Q1.5). Frames are valid on about 400 of 450 clocks, which gives
2.0 Gs/s.

Stage 1 advances 9 positions of the up-sampled stream per output frame, which
is 4.5 input samples. The scheduler (`d_scd_flg_ext`) therefore emits frames
that alternately carry 5 new samples and 4 new samples:

- A frame with 5 new samples has `pol = 0`.
- A frame with 4 new samples has `pol = 1`.

Nine input frames thus become ten stage-1 frames. The input's idle cycles are
what make room for the tenth frame. A FIFO absorbs the irregular arrival of
input frames, and a leftover buffer holds the samples a frame did not use.

Each slice produces one output word per stage-1 frame:

- Even words carry the real part of a slice sample.
- Odd words carry the imaginary part.
- The word's `pol` bit says which part it is.

Each output word is 8 bits, together with a flag, an epoch marker (`pps`) and
an end-of-frame bit.

## Stage 1: zero-stuffed polyphase filter bank (`up_poly_fir_fb`)

The input is up-sampled by two: input sample x(m) sits at up-sampled time
2m − 8, with zeros in between. The prototype low-pass filter h has 55 taps.
Conceptually the stream is shifted into a 55-position delay line, nine
positions per frame.

Half of those positions are always zero, so the block stores only the 28 real
samples, `tdl[0]` newest. Each real sample is multiplied by one of two taps,
chosen by `pol`:

| `pol` | Tap applied to `tdl[i]` |
|---|---|
| 0 | h(2i) |
| 1 | h(2i+1) |

The choice is a 2:1 multiplexer per multiplier, giving 28 multipliers per
real or imaginary component.

The products are summed into ten branches by the index of the real sample:

    y[b] = Σ tdl[b + 10l] · h(2(b + 10l) + pol),   b = 0..9

Grouping the *real* samples by ten (not the zero-stuffed positions) is what
puts the channels 200 MHz apart: one branch step is two up-sampled positions,
so the 10-point transform spans 20 up-sampled positions. Channel k is
centred at k × 200 MHz, where frequencies are counted from 0 to 2 GHz
across the complex input's band (1.2..2 GHz is the same as −0.8..0 GHz).
Channel k covers (k ± 0.5) × 200 MHz, so the default channels 1..8 cover
100..1700 MHz.

With this grouping, channel k of stage-1 frame n is:

    ch_k(n) = Σ_j h(j) u(9n − j) e^{+j2πk(j − 9n)/20}

Here u is the zero-stuffed input. This expression is the floating-point
reference that `tb_ospfb` checks against.

### Frame rotation (`circ_frm_rot`)

The factor e^{−j2πk·9n/20} in the expression above would otherwise need a
complex modulator on every channel output. It is applied instead as a
circular rotation of the ten branch outputs ahead of the transform:

    out[m] = y[(m − r) mod 10],   r(n) = (pol(n) − 9n)/2 mod 10

The rotation steps by +6 after a `pol = 0` frame and by +5 after a
`pol = 1` frame. The result is that every channel comes out of the transform
centred at 0 Hz.

### 10-point inverse transform and slice selection (`p10ifft`)

The transform is Y[k] = Σ_m x[m] e^{+j2πmk/10}. It is built as two 5-point
Winograd transforms (even and odd inputs) joined by twiddle multiplications.
It keeps eight contiguous outputs, chosen by a register:

| Selection | Channels kept |
|---|---|
| `00` (default) | 1..8 |
| `01` | 2..9 |
| `10` | 0..7 |

Latency is two clocks. Twiddle values are built at elaboration time by
constant functions.

## Stage 2: time-shared half-band filters (`hbfa`)

Each selected channel passes through a 47-tap half-band filter that
decimates by two. Apart from the centre tap (½), every odd-indexed tap is zero. The
coefficients are symmetric, so 12 distinct non-zero outer taps remain.

Decimating by two, it needs one complex output per two stage-1 frames, that
is one real word per frame. It therefore uses 12 multipliers, time-shared
between the two components:

- **Even frames:** the multipliers form the real part.
- **Odd frames:** the multipliers form the imaginary part.

Each frame, a pre-adder sums each symmetric pair of even-indexed samples, and
the centre tap is a shift of the odd-sample delay line (12 samples deep). One
adder tree per slice is shared through a multiplexer on the phase, which
gives 8 × 12 = 96 multipliers per filter bank for stage 2.

The phase of the real/imaginary alternation is realigned on the stage-1 frame
that carries an epoch marker. This way every filter bank (and every slice)
puts real and imaginary words in the same order relative to the epoch.

## Gain, requantisation, flags and markers

### Gain (`fs_scale`)

Each slice has a 4-bit shift code c and a 16-bit scale s. The gain is:

    gain = 2^(c − 2) · s / 65536

Codes above 6 are treated as 6. Code 2 with s = 65535 is unity gain, which is
the reset value.

The word is rounded to 8 bits and limited to ±127. A word that had to be
limited is flagged.

### Flags and markers (`d_scd_flg_ext`, `out_d_cond`)

The output flag marks words that may not be trusted:

- Every word before the first epoch marker is flagged.
- So are the 54 words (27 slice samples) from the first marker on.
- So are the 54 words from any stage-1 frame that uses a sample from an input
  frame carrying the input flag. 27 slice samples is the span of one input
  sample through both filters.
- Any saturated word is flagged.

Input epoch markers (`i_pps`) arrive on a frame. Only the first marker and
every third one after it are passed to the output. The output marker comes 26
words (13 slice samples, the filters' group delay) after the stage-1 frame
that took the marked sample. The two words before it carry end-of-frame. The
marked frame's 64-bit time code is held on `o_tms`.

### Marker period check (`in_d_cond`)

`in_d_cond` counts valid input frames between markers. It sets a slip/miss
status when a marker does not come exactly 19,200,000 frames (48 ms) after the
previous one.

## Registers (`ospfb_regs`)

Each filter bank has nine 32-bit registers on a small request/response bus in
its own control clock domain:

| Offset | Bits | Access | Meaning |
|---|---|---|---|
| 0 | 0 | RO | No epoch marker has arrived yet |
| 0 | 1 | RO | Marker slip/miss |
| 0 | 2 | RO | Scheduler FIFO overflow (sticky until reset) |
| 0 | 4:3 | RW | Slice selection (see table above) |
| 1..8 | 19:16 | RW | Shift code of slice 0..7 |
| 1..8 | 15:0 | RW | Scale of slice 0..7 |

- **Bus timing:** writes take byte enables. Read data comes one control clock
  after the read strobe.
- **Status bits:** pass through two-flop synchronisers.
- **Configuration bits:** are used directly in the datapath domain. They are
  meant to be changed only while the affected output is not in use (a false
  path).

## The strawman channelizer (`avcc_top`)

| Block | Function |
|---|---|
| 6 × `sync_fifo` | 512-bit × 8192-word buffer per input link (the link receivers themselves are outside) |
| `fan_in_concat` | Joins 4 × 180 + 2 × 240 bits into a 1200-bit bus: 60 bits (one frame) per filter bank. Reads all buffers together on at most nine clocks in ten. |
| 20 × `ospfb` | Filter banks 0..9 for one polarisation, 10..19 for the other |
| 2 × `circuit_switch` | 80 × 80 crossbars of 12-bit lanes (8-bit word plus `vld`, `pol`, `flg`, `pps`) with a writable route table. Reset route is the identity. Lane 8b + f of switch w carries slice f of filter bank 10w + b. |

An epoch request (`i_pps_req`) marks the next frame read from the buffers for
all filter banks at once. The marked frame carries the top-level time code
`i_tc`. Each filter bank's register bus, each time-code and end-of-frame
output, and the switch route ports are brought out.

Everything except the register buses runs on the single 450 MHz `clk`. The
buffers are clocked by it too, and the read limit sets the rate.

## Fixed point

| Point | Format |
|---|---|
| Input | Q1.5 |
| Coefficients | 18-bit Q1.17 |
| Stage-1 branch outputs | 18-bit Q5.13, saturated |
| Transform output and half-band accumulation | Wider words with 13 fraction bits |
| Output | 8 bits, where full scale of the Q1.5 input maps to ±128 at unity gain |

Every requantisation rounds half up.

The prototype and half-band coefficients are Hamming-windowed sinc filters,
computed at elaboration time by functions in `ospfb_pkg`. To use other
coefficients, replace `proto_coefs()` or `hb_coefs()`.

## Departures and open points

- **Coefficients:** these are this design's own. The measured DC gain of the
  half-band filter is 0.9989.
- **Stage-1 rotation:** the source description speaks of a rotation by one
  branch per frame. With the channel grouping above (needed for 200 MHz
  spacing on the zero-stuffed stream), the rotation that centres the channels
  steps by 6 and 5 on alternate frames.
- **Sample offset:** the up-sampled time offset of the input (x(m) at 2m − 8)
  is a choice.
- **Buffer clocking:** the buffers are not run at half rate, and no
  dual-clock FIFOs separate them from the filter banks.
- **Multiplier count:** each filter bank uses 200 multipliers: 56 in stage 1,
  40 in the transform, 96 in the half-band filters and 8 for the gains. That
  is 4000 for the top. The strawman budget is 3760, so this build exceeds it
  by 240 as written.
- **Not included:** the 100G Ethernet MACs, the control interconnect and the
  serial links to the slice processors. They are represented only by ports.

## Simulating

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M` and finishes. To build and run one with
Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -Wno-WIDTHTRUNC -Wno-WIDTHEXPAND \
        -Irtl -y rtl -y tb rtl/ospfb_pkg.sv tb/tb_ospfb.sv --top-module tb_ospfb -Mdir obj_tb_ospfb
    obj_tb_ospfb/Vtb_ospfb +verilator+rand+reset+2


| Testbench | What it checks |
|---|---|
| `tb_ospfb` | One filter bank, 2000 random frames, word by word against the floating-point reference. Also flags, saturation, markers, time codes, output count and selection changes. |
| `tb_ospfb_sines` | Eight tones, one per slice, with per-slice gains. Each slice's rms must match its own tone within 10 %, and no word may be flagged. |
| `tb_avcc_top` | The top at reduced sizes: buffers, routing, selection, slip detection, overflow and saturation. |
| `tb_avcc_full` | The top at its default sizes (8192-word buffers, 19.2 M-frame epoch period), through start-up and 1500 frames. |

The remaining testbenches each exercise one module.

All state that is read is reset, so the design also behaves under two-state
simulation with random initial values (`+verilator+rand+reset+2`).
