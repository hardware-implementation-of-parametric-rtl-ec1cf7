// timestamp_block: calculated real time of each sample of a frame.
//
// At the start of a frame (load) the current reference time, {rtc_mem,
// rtc_data}, is copied into a TIME_W-bit time register: the first sample of
// the frame gets the frame's reception time. After every sample (en) the
// register advances by PHASE_STEP ticks, the nominal sampling period in
// units of Ts/Rup. Two views of the register are output:
//   rtc_cnt  the low PHASE_W bits, the phase of the reference signal, which
//            addresses the sincos table;
//   cnt_mem  the upper SLOT_W bits, the real-time slot of width Ts*Rdown,
//            which addresses the I/Q buffer.
// Both outputs are the register itself: valid from the clock after load and
// changing on the clock after each en. load wins over en. Loading at frame
// start and stepping by the sampling period follow the published design; the
// register width and the split into phase and slot are this design's
// choices.
module timestamp_block
  import hydro_pkg::*;
#(
  parameter int unsigned STEP = PHASE_STEP
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [PHASE_W-1:0] rtc_data,
  input  logic [MEM_W-1:0]   rtc_mem,
  input  logic               en,
  input  logic               load,
  output logic [PHASE_W-1:0] rtc_cnt,
  output logic [SLOT_W-1:0]  cnt_mem
);

  logic [TIME_W-1:0] t_reg;

  always_ff @(posedge clk) begin
    if (rst)       t_reg <= '0;
    else if (load) t_reg <= {rtc_mem, rtc_data};
    else if (en)   t_reg <= t_reg + TIME_W'(STEP);
  end

  assign rtc_cnt = t_reg[PHASE_W-1:0];
  assign cnt_mem = t_reg[TIME_W-1 -: SLOT_W];

endmodule
