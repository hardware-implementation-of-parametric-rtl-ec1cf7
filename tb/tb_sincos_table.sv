// tb_sincos_table: checks every entry of the reference table against
// cos/sin computed in the testbench (within one LSB), the one-clock read
// latency and that the output holds while ena is low.
module tb_sincos_table;
  logic clk = 1'b0;
  logic ena = 1'b0;
  logic [9:0] addra = '0;
  logic signed [17:0] doa;
  int checks = 0, failures = 0;

  sincos_table dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  function automatic int expected(input int a);
    real ph;
    ph = 2.0 * 3.141592653589793 * real'(a / 2) / 512.0;
    return int'(131071.0 * (((a % 2) == 0) ? $cos(ph) : $sin(ph)));
  endfunction

  initial begin
    int e, d;
    logic signed [17:0] held;
    for (int a = 0; a < 1024; a++) begin
      @(negedge clk); ena = 1'b1; addra = 10'(a);
      @(negedge clk); ena = 1'b0;
      e = expected(a); d = int'(doa);
      check((d - e) <= 1 && (e - d) <= 1, $sformatf("entry %0d: %0d vs %0d", a, d, e));
      // with ena low a new address must not reach the output
      held = doa; addra = 10'(a + 1);
      @(negedge clk);
      check(doa == held, "hold while ena low");
    end
    // spot values: cos(0), sin(90 deg), cos(180 deg), sin(270 deg)
    @(negedge clk); ena = 1'b1; addra = 10'd0;   @(negedge clk); check(doa == 18'sd131071, "cos 0");
    addra = 10'd257; @(negedge clk); check(doa == 18'sd131071, "sin 90");
    addra = 10'd512; @(negedge clk); check(doa == -18'sd131071, "cos 180");
    addra = 10'd769; @(negedge clk); check(doa == -18'sd131071, "sin 270");
    // latency: address change is seen exactly one clock later
    addra = 10'd0; @(negedge clk);
    addra = 10'd512; #1; check(doa == 18'sd131071, "no combinational path");
    @(negedge clk); check(doa == -18'sd131071, "one-clock latency");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
