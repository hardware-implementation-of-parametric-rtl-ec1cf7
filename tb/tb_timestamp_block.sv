// tb_timestamp_block: drives random load / en patterns with random
// reference times and compares rtc_cnt and cnt_mem every cycle with a
// 14-bit time model: load copies {rtc_mem, rtc_data}, en adds the step,
// load wins over en, the register wraps.
module tb_timestamp_block;
  import hydro_pkg::*;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0, load = 1'b0;
  logic [8:0] rtc_data = '0;
  logic [4:0] rtc_mem = '0;
  logic [8:0] rtc_cnt, cnt_mem;
  int checks = 0, failures = 0;
  int model_t = 0;
  int n_wraps = 0;

  timestamp_block dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      check(rtc_cnt == 9'(model_t % 512), "rtc_cnt");
      check(cnt_mem == 9'(model_t / 32), "cnt_mem");
      load = (($urandom % 100) == 0) || (i == 0);
      en   = ($urandom % 2) == 1;
      rtc_data = 9'($urandom); rtc_mem = 5'($urandom);
      if (load) model_t = int'(rtc_mem) * 512 + int'(rtc_data);
      else if (en) begin
        model_t = model_t + PHASE_STEP;
        if (model_t >= 16384) begin model_t -= 16384; n_wraps++; end
      end
    end
    check(n_wraps > 0, "time register wrapped at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
