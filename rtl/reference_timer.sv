// reference_timer: real-time master clock shared by all hydrophone
// channels.
//
// A numerically controlled oscillator turns the system clock into ticks of
// TICK_HZ (one tick is Ts/Rup, a fraction of the sampling period): a
// 32-bit phase accumulator adds round(2**32 * TICK_HZ / CLK_HZ) every clock
// and its carry advances a TIME_W-bit time counter, which wraps. The counter
// is presented as theta (low PHASE_W bits, the phase of the reference
// signal) and mem (upper MEM_W bits). tick is high in the clock cycle in
// which the counter advances. The average tick rate is exact to 2**-32 of
// the clock; individual ticks jitter by one clock.
//
// The published design names the reference timer and its role; the NCO, the clock
// frequency and the tick rate (6000 Hz * PHASE_STEP) are this design's
// choices.
module reference_timer
  import hydro_pkg::*;
#(
  parameter longint unsigned CLK_HZ  = 12_500_000,
  parameter longint unsigned TICK_HZ = longint'(FS_HZ) * longint'(PHASE_STEP)
) (
  input  logic               clk,
  input  logic               rst,
  output logic [PHASE_W-1:0] theta,
  output logic [MEM_W-1:0]   mem,
  output logic               tick
);

  localparam int unsigned    ACC_W = 32;
  localparam longint unsigned INC  = ((TICK_HZ << ACC_W) + CLK_HZ / 2) / CLK_HZ;

  logic [ACC_W-1:0]  acc;
  logic [TIME_W-1:0] t_cnt;
  logic [ACC_W:0]    sum;

  assign sum = {1'b0, acc} + (ACC_W + 1)'(INC);

  always_ff @(posedge clk) begin
    if (rst) begin
      acc   <= '0;
      t_cnt <= '0;
      tick  <= 1'b0;
    end else begin
      acc  <= sum[ACC_W-1:0];
      tick <= sum[ACC_W];
      if (sum[ACC_W]) t_cnt <= t_cnt + 1'b1;
    end
  end

  assign theta = t_cnt[PHASE_W-1:0];
  assign mem   = t_cnt[TIME_W-1 -: MEM_W];

endmodule
