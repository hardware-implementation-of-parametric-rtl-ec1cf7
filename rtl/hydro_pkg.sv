// hydro_pkg: widths and defaults shared by the hydrophone synchronisation
// blocks.
//
// The real time of the concentrator is one binary counter of ticks, one tick
// being Ts/Rup (the sampling period divided by the up-sampling ratio). Its
// low PHASE_W bits ("theta", 9 bits) are the phase of the reference
// cosine/sine and address the sincos table; all TIME_W bits ("mem" on top of
// "theta", 5 + 9 bits) form the time stamp. The I/Q buffer is addressed by
// the upper SLOT_W bits of that time, so one buffer address is one slot of
// Ts*Rdown. The 9-bit theta, 5-bit mem, 9-bit buffer address, 16-bit
// samples, 18-bit table words and the 2 x 16-bit complex buffer word are the
// widths printed on the published FPGA block diagram; how the 5 + 9 time bits split
// into phase and buffer address, and the tick size, are this design's choice.
package hydro_pkg;

  localparam int unsigned PHASE_W    = 9;   // theta / rtc_cnt
  localparam int unsigned MEM_W      = 5;   // mem / rtc_mem
  localparam int unsigned TIME_W     = PHASE_W + MEM_W;
  localparam int unsigned SLOT_W     = 9;   // cnt_mem, buffer slot address
  localparam int unsigned SAMPLE_W   = 16;  // data16
  localparam int unsigned TABLE_W    = 18;  // sincos table word
  localparam int unsigned PROD_W     = SAMPLE_W + TABLE_W;  // p(33:0)

  // Samples per UDP frame and nominal hydrophone sampling rate.
  localparam int unsigned FRAME_SAMPLES = 512;
  localparam int unsigned FS_HZ         = 6000;

  // Ticks of real time per sampling period (Rup) and decimation ratio
  // (Rdown). PHASE_STEP * DEC_RATIO = 2**(TIME_W - SLOT_W) makes one buffer
  // address exactly one output period Ts*Rdown.
  localparam int unsigned PHASE_STEP = 8;
  localparam int unsigned DEC_RATIO  = 4;

  // Complex buffer word: Q in the upper half, I in the lower half.
  typedef struct packed {
    logic signed [SAMPLE_W-1:0] q;
    logic signed [SAMPLE_W-1:0] i;
  } iq_t;

endpackage
