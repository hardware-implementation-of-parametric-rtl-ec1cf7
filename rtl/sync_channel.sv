// sync_channel: synchronisation block of one hydrophone.
//
// The hydrophone samples on its own free-running clock and sends 512
// samples per UDP frame. Only the reception time of a frame is known against
// the concentrator's reference time, and the link delay is fixed, so that
// time stamps the frame's first sample. Every later sample is stamped by
// adding the nominal sampling period. Each sample is then mixed with the
// reference cosine and sine at its own stamped phase. Because the reference
// signal is common to all channels, the resulting I/Q values carry the
// phase against common real time, whatever the sampling instants. A
// two-channel CIC decimator low-passes I and Q. Each output is written into
// the cyclical buffer at the address of its real-time slot (width
// Ts*Rdown). The same address in the buffers of all channels is then the
// same moment, and together they form the complex measurement vector.
//
// Data path and timing (c0 = first cycle of a sample at the encoder output):
//   c0  eth_data_encode: data16, even_odd = 0 (cosine), dvld_out;
//       timestamp_block: rtc_cnt, cnt_mem of this sample
//       sincos_table address = {rtc_cnt, even_odd}
//   c1  table word ready; sample, valid and slot delayed one clock
//       iq_multiplier: p = sample * table word (registered)
//   c2  CIC input din = p[32:17], nd = valid delayed two clocks
//   c3  CIC output (every R_DOWN-th sample), written to iq_dpram at
//       {slot delayed three clocks, I/Q select}
// The odd cycle (c0 + 1) does the same with the sine and produces Q. The
// time register advances at the end of the odd cycle of each sample.
//
// The chain encoder, table, multiplier, CIC, dual-ported RAM and the time
// stamp that addresses both table and RAM follow the published FPGA block diagram.
// The pipeline registers that align the table latency, the choice of the
// product bits p[32:17] (the product scaled back to the sample range) and
// advancing the time once per sample are this design's choices.
module sync_channel
  import hydro_pkg::*;
#(
  parameter int unsigned HDR_BYTES = 44,
  parameter int unsigned N_SAMPLES = FRAME_SAMPLES,
  parameter int unsigned STEP      = PHASE_STEP,
  parameter int unsigned R_DOWN    = DEC_RATIO
) (
  input  logic               clk,
  input  logic               rst,
  // received frame
  input  logic [7:0]         dataE,
  input  logic               dvld,
  // reference time
  input  logic [PHASE_W-1:0] theta,
  input  logic [MEM_W-1:0]   mem,
  // user read port
  input  logic               read,
  input  logic [SLOT_W-1:0]  user_time,
  output iq_t                iq_user,
  output iq_t                iq_realtime
);

  // Ethernet data encode
  logic [SAMPLE_W-1:0] data16;
  logic                even_odd, dvld_out, load;

  eth_data_encode #(.HDR_BYTES(HDR_BYTES), .N_SAMPLES(N_SAMPLES)) u_encode (
    .clk, .rst, .data8(dataE), .dvld_in(dvld),
    .data16, .even_odd, .dvld_out, .load
  );

  // Time stamp: advances once per sample, after its odd cycle.
  logic [PHASE_W-1:0] rtc_cnt;
  logic [SLOT_W-1:0]  cnt_mem;

  timestamp_block #(.STEP(STEP)) u_timestamp (
    .clk, .rst, .rtc_data(theta), .rtc_mem(mem),
    .en(dvld_out && even_odd), .load,
    .rtc_cnt, .cnt_mem
  );

  // Reference cosine (even cycle) / sine (odd cycle) at the sample's phase.
  logic signed [TABLE_W-1:0] ref_val;

  sincos_table u_sincos (
    .clk, .ena(1'b1), .addra({rtc_cnt, even_odd}), .doa(ref_val)
  );

  // Align sample, valid and slot with the table's one-clock latency.
  logic signed [SAMPLE_W-1:0] sample_d1;
  logic                       vld_d1, vld_d2;
  logic [SLOT_W-1:0]          slot_d1, slot_d2, slot_d3;

  always_ff @(posedge clk) begin
    if (rst) begin
      sample_d1 <= '0;
      vld_d1    <= 1'b0;
      vld_d2    <= 1'b0;
      slot_d1   <= '0;
      slot_d2   <= '0;
      slot_d3   <= '0;
    end else begin
      sample_d1 <= data16;
      vld_d1    <= dvld_out;
      vld_d2    <= vld_d1;
      slot_d1   <= cnt_mem;
      slot_d2   <= slot_d1;
      slot_d3   <= slot_d2;
    end
  end

  // Mixer
  logic signed [PROD_W-1:0] prod;

  iq_multiplier u_mult (
    .clk, .ce(vld_d1), .a(sample_d1), .b(ref_val), .p(prod)
  );

  // Two-channel CIC: channel 0 = I (even cycles), channel 1 = Q (odd).
  logic signed [SAMPLE_W-1:0] cic_dout;
  logic                       cic_rdy, chan_sync;

  cic_decimator #(.N_CH(2), .R_DOWN(R_DOWN)) u_cic (
    .clk, .rst, .nd(vld_d2), .din(prod[PROD_W-2 -: SAMPLE_W]),
    .dout(cic_dout), .rdy(cic_rdy), .chan_sync
  );

  // Cyclical I/Q buffer addressed by real time.
  iq_dpram u_dpram (
    .clk,
    .ena(1'b1), .wea(cic_rdy), .addra({slot_d3, !chan_sync}), .dia(cic_dout),
    .doa(iq_realtime),
    .enb(read), .addrb(user_time), .dob(iq_user)
  );

  // Every I output is followed in the next cycle by the Q output of the
  // same sample, so both halves of a slot are written back to back.
  a_q_follows_i: assert property (@(posedge clk) disable iff (rst)
    (cic_rdy && chan_sync) |=> (cic_rdy && !chan_sync));

  // The multiplier's top product bit is only a sign copy except for
  // -2**15 * -(2**17 - 1) products, which the table never produces.
  logic unused_prod_bits;
  assign unused_prod_bits = ^{prod[PROD_W-1], prod[PROD_W-SAMPLE_W-2:0]};

endmodule
