// tb_iq_multiplier: random and corner-case signed products, one-clock
// latency, and holding of p while ce is low.
module tb_iq_multiplier;
  logic clk = 1'b0, ce = 1'b0;
  logic signed [15:0] a = '0;
  logic signed [17:0] b = '0;
  logic signed [33:0] p;
  int checks = 0, failures = 0;

  iq_multiplier dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  task automatic one(input logic signed [15:0] x, input logic signed [17:0] y);
    longint e;
    logic signed [33:0] p_prev;
    @(negedge clk); a = x; b = y; ce = 1'b1;
    p_prev = p;
    #1 check(p == p_prev, "no combinational path");
    @(negedge clk); ce = 1'b0;
    e = longint'(x) * longint'(y);
    check(longint'(p) == e, $sformatf("%0d * %0d = %0d", x, y, p));
    a = 16'($urandom); b = 18'($urandom);
    @(negedge clk);
    check(longint'(p) == e, "hold while ce low");
  endtask

  initial begin
    one(16'sh7fff, 18'sh1ffff);
    one(-16'sh8000, 18'sh1ffff);
    one(-16'sh8000, -18'sh1ffff);
    one(16'sh7fff, -18'sh20000);
    one(-16'sd1, -18'sd1);
    one(16'sd0, 18'sd12345);
    for (int i = 0; i < 2000; i++) one(16'($urandom), 18'($urandom));
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
