// iq_multiplier: the mixer of the I/Q detector.
//
// Multiplies the signed 16-bit sample a by the signed 18-bit reference value
// b (cosine in the even cycle, sine in the odd cycle) and registers the full
// 34-bit signed product p when ce is high; p holds otherwise. One clock of
// latency, one product per clock. Widths follow the published FPGA block diagram;
// signed arithmetic and the single register stage are this design's choices.
module iq_multiplier
  import hydro_pkg::*;
#(
  parameter int unsigned A_W = SAMPLE_W,
  parameter int unsigned B_W = TABLE_W
) (
  input  logic                       clk,
  input  logic                       ce,
  input  logic signed [A_W-1:0]      a,
  input  logic signed [B_W-1:0]      b,
  output logic signed [A_W+B_W-1:0]  p
);

  always_ff @(posedge clk) begin
    if (ce) p <= a * b;
  end

endmodule
