// sincos_table: reference signal table of the I/Q detector.
//
// A 1024 x 18 read-only block RAM. Address bits [9:1] are the phase
// (rtc_cnt, 2**9 steps per period of the reference signal) and bit [0]
// selects the component: 0 gives the cosine (even clock cycle), 1 gives the
// sine (odd clock cycle). Entry for phase p and component c is
//     round((2**17 - 1) * cos(2*pi*p/512))   for c = 0
//     round((2**17 - 1) * sin(2*pi*p/512))   for c = 1
// in signed 18-bit two's complement, computed at elaboration.
//
// Timing: doa is registered; the word for addra appears one clock after
// ena is high. The 1024 x 18 size and the even/odd cosine/sine split follow
// the FPGA description (there it is a RAM with its write port tied off);
// putting the even/odd flag in address bit 0 and the amplitude are this
// design's choices.
module sincos_table
  import hydro_pkg::*;
#(
  parameter int unsigned ADDR_W = PHASE_W + 1,
  parameter int unsigned DATA_W = TABLE_W
) (
  input  logic                     clk,
  input  logic                     ena,
  input  logic [ADDR_W-1:0]        addra,
  output logic signed [DATA_W-1:0] doa
);

  localparam int unsigned DEPTH = 2 ** ADDR_W;
  localparam real AMPL = real'((2 ** (DATA_W - 1)) - 1);
  localparam real TWO_PI = 6.283185307179586;

  typedef logic signed [DATA_W-1:0] table_t [DEPTH];

  function automatic table_t gen_table();
    table_t t;
    for (int i = 0; i < DEPTH; i++) begin
      real ph;
      real v;
      ph = TWO_PI * real'(i / 2) / real'(DEPTH / 2);
      v  = ((i % 2) == 0) ? $cos(ph) : $sin(ph);
      t[i] = DATA_W'(longint'($floor(AMPL * v + 0.5)));
    end
    return t;
  endfunction

  localparam table_t TABLE = gen_table();

  always_ff @(posedge clk) begin
    if (ena) doa <= TABLE[addra];
  end

endmodule
