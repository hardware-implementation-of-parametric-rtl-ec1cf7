# Time-stamped I/Q concentrator for asynchronous hydrophones

Direction-of-arrival sonar processing needs, for every moment, one complex
value (amplitude and phase) per hydrophone, all taken at the same instant.
Digital hydrophones do not provide that. Each one samples on its own crystal
(6000 Hz, ±100 ppm) and sends blocks of 512 samples as UDP frames. The
sampling instants of different hydrophones are unrelated, and drift against
each other.

This design is an FPGA concentrator that puts four such streams on one time
line without resampling them. It rests on three observations:

1. On a point-to-point link the delay between sampling and frame reception
   is fixed. The reception time of a frame, read from a common reference
   timer, therefore dates the frame's first sample. Each later sample is
   dated by adding the nominal sampling period.
2. The parametric methods only need a narrowband complex signal. Each
   sample is therefore multiplied by a reference cosine and sine at the
   phase its own time stamp gives, and the products are low-pass filtered.
   The reference is one signal of real time, shared by all channels. The
   phase of the resulting I/Q values is thus measured against common time,
   whenever each hydrophone happened to sample.
3. The filtered I/Q changes slowly. It is stored in a cyclical buffer whose
   address is the real-time slot of the sample. The same address in every
   channel's buffer is the same moment. One read across the four buffers
   gives the complex measurement vector.

The RTL is SystemVerilog (IEEE 1800-2017) and synthesizable. Behavioural
code exists only in the testbenches.

## Block structure

```
                       hydro_concentrator (N_CH = 4)
   reference_timer ──theta[8:0], mem[4:0]──┬──────────┬── ... (all channels)
                                            │          │
   dataE[k], dvld[k] ──► sync_channel k ────┘          │
                         │                              │
   eth_data_encode ──data16──────────────────┐          │
        │ even_odd, dvld_out, load           │          │
        ▼                                    ▼          │
   timestamp_block ──rtc_cnt──► sincos_table ──► iq_multiplier
        │ cnt_mem (slot)          {rtc_cnt,even_odd}     │ p[32:17]
        ▼                                                ▼
   iq_dpram ◄──── {slot, I/Q} ◄──── dout, rdy, chan_sync ── cic_decimator
     port B ◄── read, user_time ──► iq_user (32-bit {Q, I})
```

| module | role |
|---|---|
| `hydro_pkg` | shared widths, default ratios and the `iq_t` `{q, i}` word |
| `hydro_concentrator` | top: one reference timer, `N_CH` channels, shared user read address |
| `reference_timer` | real-time master clock, ticks of Ts/8, 14-bit time |
| `sync_channel` | one hydrophone: encoder → time stamp → table → mixer → CIC → buffer |
| `eth_data_encode` | bytes → 16-bit samples, even/odd cycle flag, frame-start pulse |
| `timestamp_block` | time of each sample: load at frame start, +8 ticks per sample |
| `sincos_table` | 1024 × 18 ROM: cosine at even, sine at odd addresses |
| `iq_multiplier` | signed 16 × 18 → 34-bit product, one register stage |
| `cic_decimator` | 2-channel, 3-stage CIC decimator, R = 4 |
| `iq_dpram` | 512-slot cyclical I/Q buffer, 16-bit write port, 32-bit read ports |

## Real time, phase and slots

The single most important convention is how one time counter serves three
purposes. The reference timer counts ticks of **Ts/Rup** (Ts = 1/6000 s,
Rup = 8, so one tick is 1/48000 s) in a 14-bit counter that wraps every
341 ms:

```
 time[13:0] = { mem[4:0] , theta[8:0] }
               └───── slot = time[13:5] ─────┘ (9 bits)
                             theta = phase (9 bits)
```

* **Phase.** The low 9 bits address the sincos table. The reference signal
  therefore completes one period every 512 ticks: 93.75 Hz at the default
  tick rate. Shifting the tick rate or the table size moves that frequency.
* **Stamp.** At frame start, `timestamp_block` copies the whole 14-bit time
  into its register. It then adds `STEP` = 8 ticks (one sampling period)
  after every sample. Its low 9 bits (`rtc_cnt`) address the table.
* **Slot.** The upper 9 bits (`cnt_mem`) address the buffer. A slot is 32
  ticks = 4 samples = Ts·Rdown. So every CIC output (one per 4 samples)
  moves to the next slot, and the buffer keeps the last 512 slots (341 ms,
  four frames).

The widths (9-bit theta, 5-bit mem, 9-bit rtc_cnt and cnt_mem, 10-bit
table address, 18-bit table words) come from the published block diagram.
Reading theta and mem as the low and high parts of one time, and the 5-bit
shift between stamp and slot, is this design's interpretation. With it,
the 5 + 9 bits of reference time map exactly onto the 9-bit phase and the
9-bit slot.

Within a frame the stamp assumes the nominal rate. With a 100 ppm crystal
the error after 512 samples is 0.05 of a sample (0.4 tick). The next frame
reloads the stamp from the reference timer, so the error never accumulates.

## What the demodulator computes

For a hydrophone signal `x = A·cos(a)` and a stamped reference phase `θ`,
the mixer forms `x·cos θ` (even cycle, channel I) and `x·sin θ` (odd cycle,
channel Q). After low-pass filtering:

```
I + jQ = (A/2) · exp(-j (a - θ))
```

`a − θ` is the signal phase relative to the common reference at the
sample's stamped time. For a tone exactly at the reference frequency it is
constant. Two hydrophones hearing the same tone then show the phase
difference the acoustic path gives them, whatever their sampling offsets.
The mixer also produces an image at twice the reference frequency. The
three-stage CIC with R = 4 attenuates it only slightly (to about 93 % at
187.5 Hz). Averaging 8 consecutive slots removes it exactly for the
default reference frequency, and the testbench does this. A stronger
low-pass needs a larger Rdown. That widens a slot unless the time split in
`hydro_pkg` changes with it. The published condition for
the decimated signal is `B < 0.5/(Ts·Rdown)`, which is 750 Hz here.

## Cycle timing of one channel

Bytes arrive one per clock with `dvld` high for the whole frame. A sample
occupies two clock cycles at the encoder output. Labelling its first
(even) cycle c0:

| cycle | what happens |
|---|---|
| c0 | `data16`, `even_odd = 0`, `dvld_out`; stamp valid; table address `{rtc_cnt, 0}` |
| c0+1 | same sample, `even_odd = 1`, table address `{rtc_cnt, 1}`; stamp advances at the end |
| c1 | cosine word out of the table; multiplier gets the sample delayed one clock |
| c2 | product `p` registered; CIC input `p[32:17]` with `nd` |
| c3 | CIC output for channel I (every 4th sample), `rdy`, `chan_sync = 1`; RAM write at `{slot, 0}` on the next edge |
| c3+1 | Q output and write at `{slot, 1}` |

The slot address travels with the sample through a three-stage delay line,
so I and Q of one output always land in the same slot. An assertion checks
that Q follows I. From the first byte of a frame to the first buffer write
is 56 clocks (44 header bytes + 8 sample bytes, plus the pipeline).
`load` is a one-clock pulse in the cycle after the first byte. The
encoder skips `HDR_BYTES` = 44 bytes, takes at most 512 samples
(big-endian) and ignores the rest of the frame.

## Parameters

| parameter | default | origin |
|---|---|---|
| `N_CH` | 4 | published design (four hydrophones) |
| `N_SAMPLES` | 512 | published design (samples per frame) |
| table | 1024 × 18 | published block diagram |
| sample / product / CIC widths | 16 / 34 / 16 in, 16 out | published block diagram |
| CIC stages, channels | 3, 2 | published design |
| `STEP` (Rup) | 8 ticks per sample | own choice |
| `R_DOWN` (Rdown) | 4 | own choice, one output per slot |
| `HDR_BYTES` | 44 | own choice: 14 MAC + 20 IPv4 + 8 UDP + 2 status |
| `CLK_HZ` | 12.5 MHz | own choice: byte rate of 100 Mbit/s Ethernet |
| `TICK_HZ` | 48 kHz | 6000 Hz × `STEP` |

`STEP × R_DOWN` must equal 32, the slot width `2**(14-9)`, for one output
per slot. `R_DOWN` must be a power of two for unity CIC gain.

## Where this design departs from, or goes beyond, the published one

* **even_odd.** The published text says the flag changes "on every second
  clock edge" and also that it marks the cosine and sine cycles of each
  sample. Here it alternates every clock inside a two-cycle sample, which
  is what the mixer needs.
* **User read address.** The published diagram prints a 6-bit user address
  on the 32-bit port. Here it is 9 bits: one 32-bit `{Q, I}` word per slot
  of the 1024 × 16 write side.
* **Down-sampling.** The CIC decimates by counting 4 samples per channel,
  as a fixed-rate filter core does. It does not switch on real-time slot
  boundaries. Each output is written to the slot of the sample that
  completes it, so its instant is known to within one slot (0.67 ms). When
  a frame's re-stamp moves the time line by a tick, a slot can be
  written twice or skipped; a skipped slot keeps its older contents.
* **Reception delay.** The fixed delay from capture to reception (about
  one frame, 85 ms) is not subtracted. It is common to all channels and
  cancels in phase differences, but it shifts absolute phase.
* **Own choices.** The reference timer (an NCO), header skipping, byte
  order, table amplitude (2^17 − 1, rounded), product bit selection, CIC
  output truncation, buffer packing `{Q, I}` and the synchronous
  active-high reset are not specified by the published design.
* **Not included.** The hydrophones, the Ethernet PHY/MAC that delivers
  `dataE`/`dvld`, and the IEEE-1588 (PTP) alternative architecture with
  swap buffers in each hydrophone. The CIC-interpolator approach (up-sample,
  then resample synchronously) is not built either. It only works when
  every sample arrives in real time, and with frames only the first one
  does.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

| testbench | what it establishes |
|---|---|
| `tb_eth_data_encode` | every sample value and its exact output cycle, even/odd order, load timing, header and trailer handling, short frames |
| `tb_sincos_table` | all 1024 entries against cos/sin (±1 LSB), one-clock latency, hold |
| `tb_iq_multiplier` | corner and random signed products, latency, clock enable |
| `tb_cic_decimator` | bit-exact against a direct convolution with the (box-car)³ kernel, unity DC gain, rdy/chan_sync timing with gaps between inputs |
| `tb_timestamp_block` | load/advance/wrap of the time register against a model |
| `tb_iq_dpram` | both ports against a model array, read-before-write, hold |
| `tb_reference_timer` | tick count = floor(n·INC/2³²) over 4.5 M clocks, tick spacing 260/261, wrap |
| `tb_sync_channel` | bit-exact model of the whole channel over 6 frames: every buffer write's value, slot and latency (4 / 5 clocks), user reads |
| `tb_hydro_concentrator` | full design at default parameters with four behavioural hydrophones (see below) |

The end-to-end test drives four hydrophone models. They sample a 95.75 Hz
tone with different phases, crystal errors of +100/−100/+50/−30 ppm and
unrelated start times, for six frames each (about 7 M clocks, around 10 s
of simulation). It checks:

* each channel's averaged I/Q against the phasor computed from the models'
  true sample times (0.04 rad, 4 %);
* the phase differences between channels at the same user read address.
  The tone is 2 Hz off the reference, so this only passes if the slots of
  all channels refer to the same real time;
* bit-exact agreement of user reads with what was written;
* the 56-clock latency from first byte to first write.

It also counts that every mechanism occurred: frame loads, header and
trailer bytes, cosine and sine cycles, I and Q writes, buffer wrap,
reference timer wrap, re-stamps that moved the time line, and user reads.

To run one testbench with Verilator 5 from the directory holding `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/hydro_pkg.sv tb/tb_hydro_concentrator.sv --top-module tb_hydro_concentrator
./obj_dir/Vtb_hydro_concentrator
```

Replace the testbench name for the others. Verilator is two-state, so the
testbenches initialise everything they read. The design resets all control
state, but buffer contents start undefined until written.
