// iq_dpram: cyclical buffer of complex samples indexed by real time.
//
// Port A (filter side) writes 16-bit words: address bits [9:1] are the
// real-time slot, bit [0] selects I (0) or Q (1). doa returns the whole
// 32-bit complex word {Q, I} of the slot addressed on port A, registered,
// so the word of the slot being filled can be watched ("IQ at real time").
// Port B (user side) reads the 32-bit complex word {Q, I} of slot addrb
// when enb ("read") is high, registered, one clock of latency. Both ports
// share one clock. Because the address is a time that wraps, the buffer is
// cyclical: it keeps the last 2**SLOT_W slots.
//
// The 16-bit write port, 32-bit read words and 10-bit port-A address follow
// the published FPGA block diagram; the 9-bit user address (one bit fewer than port
// A, so that one user word is one I/Q pair) and the {Q, I} packing are this
// design's choices.
module iq_dpram
  import hydro_pkg::*;
#(
  parameter int unsigned ADDR_W = SLOT_W
) (
  input  logic                clk,
  // port A: filter side
  input  logic                ena,
  input  logic                wea,
  input  logic [ADDR_W:0]     addra,
  input  logic [SAMPLE_W-1:0] dia,
  output iq_t                 doa,
  // port B: user side
  input  logic                enb,
  input  logic [ADDR_W-1:0]   addrb,
  output iq_t                 dob
);

  localparam int unsigned DEPTH = 2 ** ADDR_W;

  logic [SAMPLE_W-1:0] mem_i [DEPTH];
  logic [SAMPLE_W-1:0] mem_q [DEPTH];

  always_ff @(posedge clk) begin
    if (ena) begin
      if (wea && !addra[0]) mem_i[addra[ADDR_W:1]] <= dia;
      if (wea &&  addra[0]) mem_q[addra[ADDR_W:1]] <= dia;
      doa <= '{q: mem_q[addra[ADDR_W:1]], i: mem_i[addra[ADDR_W:1]]};
    end
  end

  always_ff @(posedge clk) begin
    if (enb) dob <= '{q: mem_q[addrb], i: mem_i[addrb]};
  end

endmodule
