// tb_eth_data_encode: self-checking test of the frame byte encoder.
//
// Sends frames of random bytes (header, 2*N_SAMPLES payload bytes and a
// 4-byte trailer) one byte per clock, plus one short frame that ends in the
// middle of its payload. Checks for every output cycle that a sample shows
// up exactly two clocks after its second byte, is held for two cycles with
// even_odd 0 then 1, and equals {first byte, second byte}; that load pulses
// once per frame, one clock after the first byte; and that the sample count
// per frame is N_SAMPLES (the trailer is ignored).
module tb_eth_data_encode;
  import hydro_pkg::*;

  localparam int unsigned HDR = 44;
  localparam int unsigned NS  = FRAME_SAMPLES;

  logic clk = 1'b0, rst = 1'b1;
  logic [7:0] data8 = '0;
  logic dvld_in = 1'b0;
  logic [15:0] data16;
  logic even_odd, dvld_out, load;

  int checks = 0, failures = 0;

  eth_data_encode dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Expected outputs, cycle by cycle, filled while driving.
  logic [15:0] exp_data [int];
  bit          exp_vld  [int];
  bit          exp_eo   [int];
  bit          exp_load [int];
  int cyc = 0;

  task automatic send_frame(input int n_bytes, input int gap);
    logic [7:0] hi;
    for (int j = 0; j < n_bytes; j++) begin
      logic [7:0] b;
      b = 8'($urandom);
      @(negedge clk);
      data8 = b; dvld_in = 1'b1;
      // byte j is sampled at the posedge ending cycle 'cyc'
      if (j == 0) exp_load[cyc + 1] = 1'b1;
      if (j >= HDR && j < HDR + 2 * NS) begin
        if (((j - HDR) % 2) == 0) hi = b;
        else begin
          exp_data[cyc + 1] = {hi, b}; exp_vld[cyc + 1] = 1'b1; exp_eo[cyc + 1] = 1'b0;
          exp_data[cyc + 2] = {hi, b}; exp_vld[cyc + 2] = 1'b1; exp_eo[cyc + 2] = 1'b1;
        end
      end
    end
    for (int g = 0; g < gap; g++) begin
      @(negedge clk);
      dvld_in = 1'b0; data8 = 8'($urandom);
    end
  endtask

  // cycle counter and monitor (outputs are stable at the negedge)
  int n_samples = 0, n_loads = 0;
  always @(negedge clk) begin
    if (!rst) begin
      check(load == exp_load.exists(cyc), "load timing");
      check(dvld_out == exp_vld.exists(cyc), "dvld_out timing");
      if (exp_vld.exists(cyc)) begin
        check(data16 == exp_data[cyc], "data16 value");
        check(even_odd == exp_eo[cyc], "even_odd");
      end
      if (dvld_out && !even_odd) n_samples++;
      if (load) n_loads++;
    end
    cyc++;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    cyc = 0;
    // the monitor runs before this process at each negedge; align counters
    send_frame(HDR + 2 * NS + 4, 12);
    check(n_samples == NS, "samples in full frame");
    send_frame(HDR + 2 * NS + 4, 3);
    check(n_samples == 2 * NS, "samples in second frame");
    send_frame(HDR + 21, 5);             // short frame: 10 samples
    check(n_samples == 2 * NS + 10, "samples in short frame");
    send_frame(HDR + 2 * NS + 4, 6);
    check(n_samples == 3 * NS + 10, "samples in last frame");
    check(n_loads == 4, "one load per frame");
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
