// tb_sync_channel: bit-exact test of one synchronisation channel.
//
// The testbench plays the reference timer itself: before each frame it sets
// {mem, theta} to a chosen time stamp T (random, or continuing the previous
// frame) and keeps it there while the frame is received. It sends frames of
// 44 header bytes, 512 random 16-bit samples and 4 trailer bytes.
// Independently of the design it models:
//   sample n of a frame has time T + 8n (mod 2**14), phase (T + 8n) mod 512
//   and slot (T + 8n) >> 5;
//   I input = floor(x * round((2**17-1) cos(2 pi phase/512)) / 2**17),
//   Q input likewise with sin;
//   a 3-stage CIC with decimation 4 per channel (direct convolution, scaled
//   by 2**-6), output m written to the slot of the sample that completes it.
// Checks: every buffer write (value, I/Q address, slot), the latency from
// the second byte of the completing sample to the I write (4 clocks) and to
// the Q write (5 clocks), and a final user read of every written slot
// through the read port (one-clock latency). iq_realtime is checked one
// clock after each Q write.
module tb_sync_channel;
  import hydro_pkg::*;

  localparam int HDR = 44, NS = 512, N_FRAMES = 6;

  logic clk = 1'b0, rst = 1'b1;
  logic [7:0] dataE = '0;
  logic dvld = 1'b0;
  logic [8:0] theta = '0;
  logic [4:0] mem = '0;
  logic read = 1'b0;
  logic [8:0] user_time = '0;
  iq_t iq_user, iq_realtime;
  int checks = 0, failures = 0;

  sync_channel dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------- reference model ----------------
  longint h [10];                      // (1+z^-1+z^-2+z^-3)^3
  longint xin [2][$];                  // CIC inputs per channel
  int     exp_slot [$];                // slot of each CIC output
  int     exp_cyc  [$];                // cycle of the completing second byte
  logic [15:0] exp_mem_i [512], exp_mem_q [512];
  bit          written [512];

  function automatic longint tab(input int phase, input bit s);
    real ph;
    ph = 2.0 * 3.141592653589793 * real'(phase) / 512.0;
    return longint'($floor(131071.0 * (s ? $sin(ph) : $cos(ph)) + 0.5));
  endfunction

  function automatic longint cic_out(input int c, input int m);
    longint acc = 0;
    for (int k = 0; k < 10; k++) begin
      int idx;
      idx = m * 4 + 3 - k;
      if (idx >= 0) acc += h[k] * xin[c][idx];
    end
    return acc >>> 6;
  endfunction

  // ---------------- stimulus ----------------
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic send_frame(input int t_stamp);
    logic [15:0] s;
    int t;
    {mem, theta} = 14'(t_stamp);
    for (int j = 0; j < HDR + 2 * NS + 4; j++) begin
      @(negedge clk);
      dvld = 1'b1;
      if (j < HDR || j >= HDR + 2 * NS) dataE = 8'($urandom);
      else if (((j - HDR) % 2) == 0) begin
        s = 16'($urandom);
        if ((j - HDR) / 2 < 40) s = 16'sd30000;     // full-scale start
        dataE = s[15:8];
      end else begin
        int n;
        longint pi_, pq_;
        n = (j - HDR) / 2;
        dataE = s[7:0];
        t = (t_stamp + 8 * n) % 16384;
        pi_ = longint'($signed(s)) * tab(t % 512, 1'b0);
        pq_ = longint'($signed(s)) * tab(t % 512, 1'b1);
        xin[0].push_back(longint'($signed(16'(pi_ >>> 17))));
        xin[1].push_back(longint'($signed(16'(pq_ >>> 17))));
        if ((xin[0].size() % 4) == 0) begin
          exp_slot.push_back(t / 32);
          exp_cyc.push_back(cyc);                  // posedge count when sampled
        end
      end
    end
    for (int g = 0; g < 20; g++) begin
      @(negedge clk);
      dvld = 1'b0; dataE = 8'($urandom);
    end
  endtask

  // ---------------- monitor of buffer writes ----------------
  int n_wr_i = 0, n_wr_q = 0;
  int wr_cyc_i;
  logic [15:0] last_i;
  bit rt_pending = 1'b0;
  int n_rt = 0;
  always @(posedge clk) begin
    #1;
    // one clock after a Q write, port A shows the slot with its new I word
    if (rt_pending) begin
      check(iq_realtime.i == last_i, "iq_realtime shows the slot being written");
      rt_pending = 1'b0;
      n_rt++;
    end
    if (!rst && dut.u_dpram.wea) begin
      int m;
      int sl;
      logic [15:0] e;
      sl = int'(dut.u_dpram.addra[9:1]);
      if (!dut.u_dpram.addra[0]) begin
        m = n_wr_i;
        e = 16'(cic_out(0, m));
        check(sl == exp_slot[m], $sformatf("I slot of output %0d: %0d vs %0d", m, sl, exp_slot[m]));
        check(dut.u_dpram.dia == e, $sformatf("I value of output %0d", m));
        check(cyc - exp_cyc[m] == 4, $sformatf("I write latency %0d", cyc - exp_cyc[m]));
        exp_mem_i[sl] = e; written[sl] = 1'b1; last_i = e;
        wr_cyc_i = cyc;
        n_wr_i++;
      end else begin
        m = n_wr_q;
        e = 16'(cic_out(1, m));
        check(sl == exp_slot[m], "Q slot");
        check(dut.u_dpram.dia == e, $sformatf("Q value of output %0d", m));
        check(cyc == wr_cyc_i + 1, "Q written one clock after I");
        exp_mem_q[sl] = e;
        rt_pending = 1'b1;
        n_wr_q++;
      end
    end
  end

  initial begin
    longint t [];
    int ts;
    t = new[1]; t[0] = 1;
    for (int s = 0; s < 3; s++) begin
      longint u [];
      u = new[t.size() + 3];
      foreach (u[i]) u[i] = 0;
      foreach (t[i]) for (int j = 0; j < 4; j++) u[i + j] += t[i];
      t = u;
    end
    foreach (h[i]) h[i] = t[i];

    repeat (3) @(negedge clk);
    rst = 1'b0;
    ts = 16000;                                   // wraps during frame 1
    for (int f = 0; f < N_FRAMES; f++) begin
      send_frame(ts);
      // next frame continues the time line, sometimes with a jump
      ts = (ts + 8 * NS + ((f % 2 == 1) ? int'($urandom % 2000) : 0)) % 16384;
    end
    repeat (10) @(negedge clk);
    check(n_wr_i == N_FRAMES * NS / 4 && n_wr_q == n_wr_i, "number of outputs");
    // read back every written slot through the user port
    for (int a = 0; a < 512; a++) begin
      if (!written[a]) continue;
      @(negedge clk); read = 1'b1; user_time = 9'(a);
      @(negedge clk); read = 1'b0;
      check(iq_user.i == exp_mem_i[a] && iq_user.q == exp_mem_q[a], $sformatf("user read slot %0d", a));
    end
    check(n_rt == n_wr_q, "iq_realtime checked after every output");
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
