// tb_iq_dpram: writes random I and Q words through port A, checks the
// registered {Q, I} word on port A and user reads on port B (one-clock
// latency, holding while enb is low) against a model array, including a
// read of a slot in the same cycle it is written (old data is returned).
module tb_iq_dpram;
  import hydro_pkg::*;
  logic clk = 1'b0;
  logic ena = 1'b0, wea = 1'b0, enb = 1'b0;
  logic [9:0] addra = '0;
  logic [15:0] dia = '0;
  logic [8:0] addrb = '0;
  iq_t doa, dob;
  int checks = 0, failures = 0;
  logic [15:0] m_i [512];
  logic [15:0] m_q [512];

  iq_dpram dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    iq_t exp_a, exp_b, held;
    bit  rd;
    // fill every slot
    for (int a = 0; a < 1024; a++) begin
      @(negedge clk);
      ena = 1'b1; wea = 1'b1; addra = 10'(a); dia = 16'($urandom);
      if (a % 2 == 0) m_i[a / 2] = dia; else m_q[a / 2] = dia;
    end
    @(negedge clk); wea = 1'b0; ena = 1'b0;
    // random traffic on both ports
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      ena = 1'b1;
      wea = ($urandom % 2) == 1;
      addra = 10'($urandom);
      dia = 16'($urandom);
      rd = ($urandom % 4) != 0;
      enb = rd;
      addrb = (n % 7 == 0) ? addra[9:1] : 9'($urandom);
      exp_a = '{q: m_q[addra[9:1]], i: m_i[addra[9:1]]};   // read before write
      exp_b = '{q: m_q[addrb], i: m_i[addrb]};
      held = dob;
      if (wea) begin
        if (addra[0]) m_q[addra[9:1]] = dia; else m_i[addra[9:1]] = dia;
      end
      @(posedge clk); #1;
      check(doa == exp_a, "port A word");
      check(dob == (rd ? exp_b : held), rd ? "port B read" : "port B hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
