// cic_decimator: multi-channel Hogenauer (cascaded integrator-comb)
// decimator, the low-pass filter of the I/Q detector.
//
// N_STAGES integrators run at the input rate, the integrator output is
// down-sampled by R_DOWN, and N_STAGES combs (differential delay 1) run at
// the output rate. The channels are time-multiplexed: consecutive nd strobes
// belong to channel 0, 1, ..., N_CH-1, 0, ... (I on even cycles, Q on odd
// cycles for N_CH = 2), and every channel has its own integrator, comb and
// decimation-counter state. Arithmetic is two's complement with
// DIN_W + N_STAGES*log2(R_DOWN) internal bits, so integrator wrap-around is
// harmless. The DC gain R_DOWN**N_STAGES is removed by keeping the upper
// DOUT_W bits of the full-precision result (truncation), which gives unity
// DC gain when R_DOWN is a power of two.
//
// Interface and timing: din is taken when nd is high. When a channel has
// received R_DOWN samples since its last output, its filtered value appears
// on dout one clock later with rdy high for one cycle; chan_sync is high
// when that output belongs to channel 0. The three-integrator / three-comb
// structure and the two channels follow the published design; the output scaling,
// the channel order and the count-based down-sampling are this design's
// choices.
module cic_decimator
  import hydro_pkg::*;
#(
  parameter int unsigned N_CH     = 2,
  parameter int unsigned N_STAGES = 3,
  parameter int unsigned R_DOWN   = DEC_RATIO,
  parameter int unsigned DIN_W    = SAMPLE_W,
  parameter int unsigned DOUT_W   = SAMPLE_W
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     nd,
  input  logic signed [DIN_W-1:0]  din,
  output logic signed [DOUT_W-1:0] dout,
  output logic                     rdy,
  output logic                     chan_sync
);

  localparam int unsigned ACC_W = DIN_W + N_STAGES * $clog2(R_DOWN);
  localparam int unsigned CH_W  = (N_CH > 1) ? $clog2(N_CH) : 1;
  localparam int unsigned DEC_W = (R_DOWN > 1) ? $clog2(R_DOWN) : 1;

  typedef logic signed [ACC_W-1:0] acc_t;

  acc_t             integ  [N_CH][N_STAGES];   // integrator registers
  acc_t             comb_d [N_CH][N_STAGES];   // comb delay registers
  logic [DEC_W-1:0] dec_cnt[N_CH];
  logic [CH_W-1:0]  ch;                        // channel of the next nd

  // Integrator and comb chains of the current channel.
  acc_t integ_nxt [N_STAGES];
  acc_t comb_out  [N_STAGES];
  logic dec_now;

  always_comb begin
    acc_t x;
    x = ACC_W'(din);
    for (int s = 0; s < N_STAGES; s++) begin
      integ_nxt[s] = integ[ch][s] + x;
      x = integ_nxt[s];
    end
    for (int s = 0; s < N_STAGES; s++) begin
      comb_out[s] = x - comb_d[ch][s];
      x = comb_out[s];
    end
    dec_now = (dec_cnt[ch] == DEC_W'(R_DOWN - 1));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int c = 0; c < N_CH; c++) begin
        dec_cnt[c] <= '0;
        for (int s = 0; s < N_STAGES; s++) begin
          integ[c][s]  <= '0;
          comb_d[c][s] <= '0;
        end
      end
      ch        <= '0;
      dout      <= '0;
      rdy       <= 1'b0;
      chan_sync <= 1'b0;
    end else begin
      rdy <= 1'b0;
      if (nd) begin
        for (int s = 0; s < N_STAGES; s++) integ[ch][s] <= integ_nxt[s];
        ch <= (ch == CH_W'(N_CH - 1)) ? '0 : ch + 1'b1;
        if (dec_now) begin
          dec_cnt[ch] <= '0;
          comb_d[ch][0] <= integ_nxt[N_STAGES-1];
          for (int s = 1; s < N_STAGES; s++) comb_d[ch][s] <= comb_out[s-1];
          dout      <= comb_out[N_STAGES-1][ACC_W-1 -: DOUT_W];
          rdy       <= 1'b1;
          chan_sync <= (ch == '0);
        end else begin
          dec_cnt[ch] <= dec_cnt[ch] + 1'b1;
        end
      end
    end
  end

endmodule
