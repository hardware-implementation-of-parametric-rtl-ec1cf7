// hydro_concentrator: concentrator that aligns the asynchronous data
// streams of N_CH digital hydrophones to one real time.
//
// Each hydrophone is connected point to point and sends UDP frames of 512
// samples taken on its own crystal (6000 Hz +- 100 ppm). One
// reference_timer provides the common real time (theta, mem) to N_CH
// sync_channel blocks. Each channel stamps its frames with that time,
// demodulates the samples to I/Q against the common reference signal and
// writes them into its own cyclical buffer, addressed by real-time slot. A
// user read of slot user_time (read high) returns, one clock later, the
// complex sample of every channel for that same moment on iq_user: the
// measurement vector for direction-of-arrival processing. iq_realtime shows
// the word of the slot each channel is currently filling.
//
// All logic runs on one clock clk, the byte clock of the receive
// interfaces; rst is a synchronous reset. The four channels and the shared
// reference timer follow the published concentrator; the single clock and
// the port packing are this design's choices.
module hydro_concentrator
  import hydro_pkg::*;
#(
  parameter int unsigned     N_CH      = 4,
  parameter int unsigned     HDR_BYTES = 44,
  parameter int unsigned     N_SAMPLES = FRAME_SAMPLES,
  parameter int unsigned     STEP      = PHASE_STEP,
  parameter int unsigned     R_DOWN    = DEC_RATIO,
  parameter longint unsigned CLK_HZ    = 12_500_000,
  parameter longint unsigned TICK_HZ   = longint'(FS_HZ) * longint'(PHASE_STEP)
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [7:0]         dataE [N_CH],
  input  logic               dvld  [N_CH],
  input  logic               read,
  input  logic [SLOT_W-1:0]  user_time,
  output iq_t                iq_user     [N_CH],
  output iq_t                iq_realtime [N_CH],
  output logic [PHASE_W-1:0] theta,
  output logic [MEM_W-1:0]   mem
);

  logic tick;

  reference_timer #(.CLK_HZ(CLK_HZ), .TICK_HZ(TICK_HZ)) u_timer (
    .clk, .rst, .theta, .mem, .tick
  );

  for (genvar k = 0; k < N_CH; k++) begin : g_ch
    sync_channel #(
      .HDR_BYTES(HDR_BYTES), .N_SAMPLES(N_SAMPLES), .STEP(STEP), .R_DOWN(R_DOWN)
    ) u_ch (
      .clk, .rst,
      .dataE(dataE[k]), .dvld(dvld[k]),
      .theta, .mem,
      .read, .user_time,
      .iq_user(iq_user[k]), .iq_realtime(iq_realtime[k])
    );
  end

  logic unused_tick;
  assign unused_tick = tick;

endmodule
