// tb_cic_decimator: compares the two-channel CIC decimator with a direct
// convolution model.
//
// For N stages and ratio R the decimator output m of a channel is
//   y[m] = floor( sum_k h[k] * x[m*R + R - 1 - k] / R**N ),
// where h is the R-tap box-car convolved with itself N times (length
// N*(R-1)+1) and x is that channel's input (zero before the first sample).
// The test feeds interleaved I/Q inputs with random gaps between strobes,
// checks every output value, that rdy comes exactly one clock after the
// R-th strobe of a channel, that chan_sync marks channel 0, and the output
// count. A constant input must come out with unity gain.
module tb_cic_decimator;
  localparam int N = 3, R = 4, NIN = 4000;

  logic clk = 1'b0, rst = 1'b1, nd = 1'b0;
  logic signed [15:0] din = '0;
  logic signed [15:0] dout;
  logic rdy, chan_sync;
  int checks = 0, failures = 0;

  cic_decimator dut (.*);   // defaults: 2 channels, 3 stages, R = 4
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  longint h [N * (R - 1) + 1];
  longint x [2][NIN];
  int     n_in [2] = '{0, 0};
  int     n_out [2] = '{0, 0};
  bit     expect_rdy = 1'b0;
  int     expect_ch = 0;

  function automatic longint model(input int c, input int m);
    longint acc = 0;
    for (int k = 0; k < N * (R - 1) + 1; k++) begin
      int idx = m * R + R - 1 - k;
      if (idx >= 0) acc += h[k] * x[c][idx];
    end
    // floor division by R**N (R**N is a power of two)
    return acc >>> (N * $clog2(R));
  endfunction

  // monitor just after each posedge; the expectation was set at the
  // preceding negedge together with the inputs
  always @(posedge clk) begin
    #1;
    if (!rst) begin
      check(rdy == expect_rdy, "rdy timing");
      if (rdy) begin
        check(chan_sync == (expect_ch == 0), "chan_sync");
        check(longint'(dout) == model(expect_ch, n_out[expect_ch]),
              $sformatf("ch %0d out %0d: %0d vs %0d", expect_ch, n_out[expect_ch],
                        dout, model(expect_ch, n_out[expect_ch])));
        n_out[expect_ch]++;
      end
    end
  end

  initial begin
    longint t [];
    // h = box-car (R ones) convolved N times
    t = new[1]; t[0] = 1;
    for (int s = 0; s < N; s++) begin
      longint u [];
      u = new[t.size() + R - 1];
      foreach (u[i]) u[i] = 0;
      foreach (t[i]) for (int j = 0; j < R; j++) u[i + j] += t[i];
      t = u;
    end
    foreach (h[i]) h[i] = t[i];

    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 2 * NIN; i++) begin
      int c;
      int gap;
      logic signed [15:0] v;
      c = i % 2;
      if (i < 400) v = 16'sd20000;                       // constant: unity gain
      else if (i < 800) v = (i % 4 < 2) ? 16'sh7fff : -16'sh8000; // full-scale
      else v = 16'($urandom);
      x[c][n_in[c]] = longint'(v);
      @(negedge clk);
      // what the monitor must see just after the next posedge
      expect_rdy = (((n_in[c] + 1) % R) == 0);
      expect_ch  = c;
      n_in[c]++;
      nd = 1'b1; din = v;
      gap = (i > 1000 && ($urandom % 3) == 0) ? 1 + ($urandom % 3) : 0;
      for (int g = 0; g < gap; g++) begin
        @(negedge clk);
        expect_rdy = 1'b0;
        nd = 1'b0; din = 16'($urandom);
      end
    end
    @(negedge clk); expect_rdy = 1'b0; nd = 1'b0;
    @(negedge clk);
    check(n_out[0] == NIN / R && n_out[1] == NIN / R, "output count");
    // unity DC gain for the constant part (after the filter has settled)
    check(model(0, 20) == 20000 && model(1, 20) == 20000, "model unity gain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
