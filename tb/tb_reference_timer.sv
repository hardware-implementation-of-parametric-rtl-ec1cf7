// tb_reference_timer: runs the timer at its default clock and tick rates
// (12.5 MHz clock, 48 kHz ticks) for 4 500 000 clocks (past one wrap of the 14-bit time) and checks that
//  - the tick count after n clocks is floor(n * INC / 2**32), with
//    INC = round(2**32 * 48000 / 12.5e6), i.e. the average rate is right;
//  - ticks are 260 or 261 clocks apart;
//  - {mem, theta} equals the tick count modulo 2**14 and wraps.
module tb_reference_timer;
  import hydro_pkg::*;
  localparam longint unsigned INC = ((64'd48000 << 32) + 64'd6250000) / 64'd12500000;
  localparam int N_CLK = 4_500_000;

  logic clk = 1'b0, rst = 1'b1;
  logic [8:0] theta;
  logic [4:0] mem;
  logic tick;
  int checks = 0, failures = 0;

  reference_timer dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    longint n_ticks = 0;
    longint last = -1;
    longint expect_ticks;
    int wraps = 0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (longint n = 1; n <= N_CLK; n++) begin
      @(posedge clk); #1;
      if (tick) begin
        n_ticks++;
        if (last >= 0) check((n - last) == 260 || (n - last) == 261, "tick spacing");
        last = n;
        if ({mem, theta} == 14'd0) wraps++;
      end
      if ((n % 997) == 0 || tick) begin
        expect_ticks = longint'((n * INC) >> 32);
        check(n_ticks == expect_ticks, $sformatf("tick count %0d vs %0d", n_ticks, expect_ticks));
        check({mem, theta} == 14'(n_ticks), "time value");
      end
    end
    check(wraps > 0, "time counter wrapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N_CLK + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
