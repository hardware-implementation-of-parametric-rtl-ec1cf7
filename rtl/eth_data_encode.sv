// eth_data_encode: turns the byte stream of one received UDP frame into
// 16-bit samples for the I/Q mixer.
//
// Bytes arrive on data8 with dvld_in high for the whole frame (the
// data-valid envelope of the receive interface). The first HDR_BYTES bytes
// of the frame (MAC, IP and UDP headers and the hydrophone status word) are
// skipped; after them every two bytes form one sample, first byte in the
// upper half (network byte order). Up to N_SAMPLES samples are taken per
// frame; bytes after them (the frame check sequence, padding) are ignored.
//
// Interface and timing (all outputs registered):
//   load     one-cycle pulse in the cycle after the first byte of a frame;
//            tells the time-stamp block to copy the reference time.
//   data16   the sample, held for two clock cycles, valid one cycle after
//            its second byte.
//   dvld_out high during both cycles of each sample.
//   even_odd 0 in the first (even, cosine / I) cycle of a sample and 1 in
//            the second (odd, sine / Q) cycle.
// A new sample can therefore start every second cycle, which is the rate of
// a byte-per-clock stream. Pairing bytes into samples, the two-cycle sample
// and the even/odd flag follow the published FPGA design; header skipping, the
// byte order and the sample limit are this design's choices.
module eth_data_encode
  import hydro_pkg::*;
#(
  parameter int unsigned HDR_BYTES = 44,             // 14 MAC + 20 IP + 8 UDP + 2 status
  parameter int unsigned N_SAMPLES = FRAME_SAMPLES
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [7:0]          data8,
  input  logic                dvld_in,
  output logic [SAMPLE_W-1:0] data16,
  output logic                even_odd,
  output logic                dvld_out,
  output logic                load
);

  localparam int unsigned CNT_W = $clog2(HDR_BYTES + 2 * N_SAMPLES + 2);

  logic             dvld_q;      // dvld_in of the previous cycle
  logic [CNT_W-1:0] byte_cnt;    // bytes of the current frame seen so far
  logic [7:0]       hi_byte;     // first byte of the sample being built
  logic             second;      // next output cycle is the odd one

  // Byte position inside the payload and whether it is a sample byte.
  logic             in_payload;
  logic             pay_odd;     // second byte of a sample
  always_comb begin
    pay_odd    = byte_cnt[0] ^ HDR_BYTES[0];
    in_payload = (byte_cnt >= CNT_W'(HDR_BYTES)) &&
                 (byte_cnt <  CNT_W'(HDR_BYTES + 2 * N_SAMPLES));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      dvld_q   <= 1'b0;
      byte_cnt <= '0;
      hi_byte  <= '0;
      second   <= 1'b0;
      data16   <= '0;
      even_odd <= 1'b0;
      dvld_out <= 1'b0;
      load     <= 1'b0;
    end else begin
      dvld_q <= dvld_in;
      load   <= dvld_in && !dvld_q;

      // Second (odd) cycle of a sample follows its first (even) cycle.
      if (second) begin
        even_odd <= 1'b1;
        second   <= 1'b0;
      end else begin
        dvld_out <= 1'b0;
        even_odd <= 1'b0;
      end

      if (!dvld_in) begin
        byte_cnt <= '0;
      end else begin
        if (byte_cnt != '1) byte_cnt <= byte_cnt + 1'b1;
        if (in_payload) begin
          if (!pay_odd) begin
            hi_byte <= data8;
          end else begin
            data16   <= {hi_byte, data8};
            dvld_out <= 1'b1;
            even_odd <= 1'b0;
            second   <= 1'b1;
          end
        end
      end
    end
  end

  // A sample is presented for exactly two cycles: even, then odd.
  a_odd_after_even: assert property (@(posedge clk) disable iff (rst)
    (dvld_out && !even_odd) |=> (dvld_out && even_odd));
  a_odd_needs_valid: assert property (@(posedge clk) disable iff (rst)
    even_odd |-> dvld_out);

endmodule
