// hydrophone_model: behavioural model of a digital hydrophone (testbench
// only, not synthesizable).
//
// Samples the tone A*cos(2*pi*F0*t + PHASE) at its own rate FS (nominal
// 6000 Hz with a crystal error), starting at time T0, collects 512 samples
// per frame and, TX_DELAY clocks after the last sample of a frame, sends
// the frame one byte per clock: HDR_BYTES header bytes, the samples as
// signed 16-bit big-endian words, then 4 trailer bytes, with dvld high for
// the whole frame. Time is counted in clocks of CLK_PERIOD seconds since
// the clock started. For every frame it records the true capture time of
// its first sample and the clock count at which the first byte was sent.
module hydrophone_model #(
  parameter real FS         = 6000.0,
  parameter real F0         = 93.75,
  parameter real AMPL       = 20000.0,
  parameter real PHASE      = 0.0,
  parameter real T0         = 0.0,
  parameter real CLK_PERIOD = 80.0e-9,
  parameter int  HDR_BYTES  = 44,
  parameter int  NS         = 512,
  parameter int  TX_DELAY   = 100,
  parameter int  MAX_FRAMES = 64
) (
  input  logic       clk,
  output logic [7:0] dataE,
  output logic       dvld
);

  localparam real TWO_PI = 6.283185307179586;

  int          n_frames_sent = 0;
  real         t_first  [MAX_FRAMES];  // capture time of sample 0 of frame f
  longint      clk_first[MAX_FRAMES];  // clock count of the first byte

  logic [15:0] buf_cap [NS];
  logic [15:0] buf_tx  [NS];
  longint      n_clk = 0;
  longint      n_samp = 0;
  longint      tx_start = -1;
  int          n_captured = 0;
  int          tx_byte = -1;

  initial begin
    dataE = '0;
    dvld  = 1'b0;
  end

  always @(negedge clk) begin
    real t_now;
    real t_next;
    n_clk++;
    t_now = real'(n_clk) * CLK_PERIOD;
    // capture every sample whose time has come
    t_next = T0 + real'(n_samp) / FS;
    while (t_now >= t_next) begin
      buf_cap[int'(n_samp % NS)] = 16'(int'($floor(AMPL * $cos(TWO_PI * F0 * t_next + PHASE) + 0.5)));
      if ((n_samp % NS) == 0 && n_captured < MAX_FRAMES) t_first[n_captured] = t_next;
      n_samp++;
      if ((n_samp % NS) == 0) begin
        buf_tx   = buf_cap;
        tx_start = n_clk + TX_DELAY;
        n_captured++;
      end
      t_next = T0 + real'(n_samp) / FS;
    end
    // transmit
    if (n_clk == tx_start && n_frames_sent < MAX_FRAMES) tx_byte = 0;
    if (tx_byte >= 0) begin
      if (tx_byte == 0) clk_first[n_frames_sent] = n_clk;
      dvld = 1'b1;
      if (tx_byte < HDR_BYTES || tx_byte >= HDR_BYTES + 2 * NS)
        dataE = 8'($urandom);
      else if (((tx_byte - HDR_BYTES) % 2) == 0)
        dataE = buf_tx[(tx_byte - HDR_BYTES) / 2][15:8];
      else
        dataE = buf_tx[(tx_byte - HDR_BYTES) / 2][7:0];
      tx_byte++;
      if (tx_byte == HDR_BYTES + 2 * NS + 4) begin
        tx_byte = -1;
        n_frames_sent++;
      end
    end else begin
      dvld  = 1'b0;
      dataE = 8'($urandom);
    end
  end

endmodule
