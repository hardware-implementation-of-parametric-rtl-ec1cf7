// tb_hydro_concentrator: end-to-end test of the four-channel concentrator
// at its default parameters.
//
// Four behavioural hydrophones sample the same acoustic tone, of frequency
// F = 95.75 Hz (2 Hz above the 93.75 Hz reference signal), with different
// phases PHASE[k], crystal errors of +100, -100, +50 and -30 ppm and
// unrelated start times. Each sends frames of 512 samples, so the four
// streams arrive at unrelated times. The design must put all four on one
// time line.
//
// Expected values are computed from the model's true sample times, not from
// the design. Sample n of a frame is stamped m0 + 8n, where m0 is the
// reference timer count (floor(clocks * INC / 2**32)) when the frame's
// first byte arrives. Its demodulated phasor is
// (A/2)*exp(-j*psi), with psi = 2*pi*F*t_n + PHASE - 2*pi*(m0 + 8n)/512.
// Averaging 8 consecutive CIC outputs (32 samples, one period of the
// 2*F0 mixer image) removes the image. Checks:
//  - per channel, each 8-output average matches A/2*exp(-j*psi) at the
//    window centre (CIC group delay 4.5 samples) to 0.04 rad and 4 %;
//  - across channels, reading the buffers at the same user_time gives
//    phase differences PHASE[k] - PHASE[0] to 0.04 rad (this needs the
//    slots of all channels to mean the same real time, because the phasor
//    turns at 2 Hz);
//  - user reads return exactly what was written (one-clock latency);
//  - the first buffer write of every frame comes a fixed 56 clocks after
//    the frame's first byte;
//  - each mechanism happens at least once: frame loads, header skipping,
//    trailer dropping, cosine/sine cycles, I and Q writes, buffer wrap,
//    reference timer wrap, re-stamping that corrects the time line at a
//    frame start, user reads.
module tb_hydro_concentrator;
  import hydro_pkg::*;

  localparam int  NCH = 4, N_FRAMES = 6, NS = 512;
  localparam real TWO_PI = 6.283185307179586;
  localparam real F_SIG = 95.75, AMPL = 20000.0;
  localparam longint unsigned INC = ((64'd48000 << 32) + 64'd6250000) / 64'd12500000;
  localparam real PH [NCH] = '{0.0, 0.7, -1.2, 2.5};

  logic clk = 1'b0, rst = 1'b1;
  logic [7:0] dataE [NCH];
  logic dvld [NCH];
  logic read = 1'b0;
  logic [8:0] user_time = '0;
  iq_t iq_user [NCH];
  iq_t iq_realtime [NCH];
  logic [8:0] theta;
  logic [4:0] mem;
  int checks = 0, failures = 0;

  hydro_concentrator dut (.*);
  always #5 clk = ~clk;

  hydrophone_model #(.FS(6000.0 * (1.0 + 100e-6)), .F0(F_SIG), .AMPL(AMPL), .PHASE(PH[0]), .T0(0.3e-3))
    u_h0 (.clk, .dataE(dataE[0]), .dvld(dvld[0]));
  hydrophone_model #(.FS(6000.0 * (1.0 - 100e-6)), .F0(F_SIG), .AMPL(AMPL), .PHASE(PH[1]), .T0(20.1e-3))
    u_h1 (.clk, .dataE(dataE[1]), .dvld(dvld[1]));
  hydrophone_model #(.FS(6000.0 * (1.0 + 50e-6)), .F0(F_SIG), .AMPL(AMPL), .PHASE(PH[2]), .T0(41.7e-3))
    u_h2 (.clk, .dataE(dataE[2]), .dvld(dvld[2]));
  hydrophone_model #(.FS(6000.0 * (1.0 - 30e-6)), .F0(F_SIG), .AMPL(AMPL), .PHASE(PH[3]), .T0(63.2e-3))
    u_h3 (.clk, .dataE(dataE[3]), .dvld(dvld[3]));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic real wrap_pi(input real a);
    real r = a;
    while (r >  3.141592653589793) r -= TWO_PI;
    while (r < -3.141592653589793) r += TWO_PI;
    return r;
  endfunction

  // model data of each hydrophone, gathered through hierarchy
  function automatic real model_t_first(input int k, input int f);
    case (k)
      0: return u_h0.t_first[f];
      1: return u_h1.t_first[f];
      2: return u_h2.t_first[f];
      default: return u_h3.t_first[f];
    endcase
  endfunction
  function automatic longint model_clk_first(input int k, input int f);
    case (k)
      0: return u_h0.clk_first[f];
      1: return u_h1.clk_first[f];
      2: return u_h2.clk_first[f];
      default: return u_h3.clk_first[f];
    endcase
  endfunction
  function automatic real model_fs(input int k);
    case (k)
      0: return u_h0.FS;
      1: return u_h1.FS;
      2: return u_h2.FS;
      default: return u_h3.FS;
    endcase
  endfunction

  // ---------------- observation of the design ----------------
  longint pos_cnt = 0;                   // posedges since reset release
  int n_load = 0, n_hdr = 0, n_trail = 0, n_cos = 0, n_sin = 0;
  int n_wr_i [NCH], n_wr_q [NCH];
  int n_vec = 0;
  int n_buf_wrap = 0, n_timer_wrap = 0, n_restamp = 0, n_reads = 0;
  real out_i [NCH][$];
  real out_q [NCH][$];
  int  last_slot [NCH];
  logic [15:0] mem_i [NCH][512], mem_q [NCH][512];
  bit  written [NCH][512];
  real slot_t  [NCH][512];               // true time of the last write of a slot
  longint first_wr_lat [$];
  int  frame_of_load [NCH];
  logic [13:0] t_before_load [NCH];
  logic [13:0] prev_time;

  // per-channel hierarchical probes
  logic        p_load [NCH], p_dvld_in [NCH], p_dvld_out [NCH], p_eo [NCH];
  logic        p_wea [NCH];
  logic [9:0]  p_addra [NCH];
  logic [15:0] p_dia [NCH];
  logic [8:0]  p_rtc [NCH];
  logic [8:0]  p_slot [NCH];
  int          p_bcnt [NCH];   // bytes of the frame taken so far
  for (genvar k = 0; k < NCH; k++) begin : g_probe
    assign p_load[k]     = dut.g_ch[k].u_ch.u_encode.load;
    assign p_dvld_in[k]  = dut.g_ch[k].u_ch.u_encode.dvld_in;
    assign p_dvld_out[k] = dut.g_ch[k].u_ch.u_encode.dvld_out;
    assign p_eo[k]       = dut.g_ch[k].u_ch.u_encode.even_odd;
    assign p_wea[k]      = dut.g_ch[k].u_ch.u_dpram.wea;
    assign p_addra[k]    = dut.g_ch[k].u_ch.u_dpram.addra;
    assign p_dia[k]      = dut.g_ch[k].u_ch.u_dpram.dia;
    assign p_rtc[k]      = dut.g_ch[k].u_ch.u_timestamp.rtc_cnt;
    assign p_slot[k]     = dut.g_ch[k].u_ch.u_timestamp.cnt_mem;
    assign p_bcnt[k]     = int'(dut.g_ch[k].u_ch.u_encode.byte_cnt);
  end

  always @(posedge clk) begin
    #1;
    if (!rst) begin
      pos_cnt++;
      if ({mem, theta} == 14'd0 && prev_time == 14'h3fff) n_timer_wrap++;
      prev_time = {mem, theta};
      for (int k = 0; k < NCH; k++) begin
        if (p_load[k]) begin
          n_load++;
          t_before_load[k] = {p_slot[k][8:4], p_rtc[k]};
        end
        // just after a posedge the byte taken there is number p_bcnt - 1
        if (p_dvld_in[k] && p_bcnt[k] >= 1 && p_bcnt[k] <= 44) n_hdr++;
        if (p_dvld_in[k] && p_bcnt[k] > 44 + 2 * NS) n_trail++;
        if (p_dvld_out[k] && !p_eo[k]) n_cos++;
        if (p_dvld_out[k] &&  p_eo[k]) n_sin++;
        if (p_wea[k]) begin
          int sl;
          sl = int'(p_addra[k][9:1]);
          if (!p_addra[k][0]) begin
            // first write of a frame: output index multiple of 128
            if ((n_wr_i[k] % (NS / 4)) == 0) begin
              int f;
              f = n_wr_i[k] / (NS / 4);
              first_wr_lat.push_back(pos_cnt - (model_clk_first(k, f) - 2));
            end
            if (n_wr_i[k] > 0 && sl == 0 && last_slot[k] == 511) n_buf_wrap++;
            last_slot[k] = sl;
            out_i[k].push_back(real'($signed(p_dia[k])));
            mem_i[k][sl] = p_dia[k];
            written[k][sl] = 1'b1;
            begin
              int n_done;
              n_done = 4 * n_wr_i[k] + 3;
              slot_t[k][sl] = model_t_first(k, n_done / NS) + real'(n_done % NS) / model_fs(k);
            end
            n_wr_i[k]++;
          end else begin
            out_q[k].push_back(real'($signed(p_dia[k])));
            mem_q[k][sl] = p_dia[k];
            n_wr_q[k]++;
          end
        end
      end
    end
  end

  // re-stamping: at a load the time register jumps to the reference time;
  // count frames where that differs from where the time line would have
  // continued (the hydrophone clock drifts against the reference)
  always @(posedge clk) begin
    #2;
    for (int k = 0; k < NCH; k++)
      if (!rst && p_load[k] && n_wr_i[k] > 0) begin
        logic [13:0] now_t;
        // one clock later the register holds the loaded value
        @(posedge clk); #2;
        now_t = {p_slot[k][8:4], p_rtc[k]};
        if (now_t != t_before_load[k]) n_restamp++;
      end
  end

  // expected phasor of channel k around sample index n_mid of frame f
  function automatic real expected_psi(input int k, input int f, input real n_mid);
    real t_n, m0, th;
    longint c;
    c  = model_clk_first(k, f) - 2;           // posedges since reset before the first byte
    m0 = real'((longint'(c) * longint'(INC)) >> 32);
    t_n = model_t_first(k, f) + n_mid / model_fs(k);
    th  = TWO_PI * (m0 + 8.0 * n_mid) / 512.0;
    return wrap_pi(TWO_PI * F_SIG * t_n + PH[k] - th);
  endfunction

  initial begin
    foreach (n_wr_i[k]) begin n_wr_i[k] = 0; n_wr_q[k] = 0; last_slot[k] = 0; end
    foreach (written[k, s]) written[k][s] = 1'b0;
    prev_time = '0;
    repeat (1) @(negedge clk);
    rst = 1'b0;
    // wait until every hydrophone has sent its frames
    wait (u_h0.n_frames_sent == N_FRAMES && u_h1.n_frames_sent == N_FRAMES &&
          u_h2.n_frames_sent == N_FRAMES && u_h3.n_frames_sent == N_FRAMES);
    repeat (20) @(negedge clk);

    // ---- per-channel absolute phase and amplitude ----
    for (int k = 0; k < NCH; k++) begin
      check(n_wr_i[k] == N_FRAMES * NS / 4 && n_wr_q[k] == n_wr_i[k], $sformatf("ch %0d output count", k));
      for (int o = 4; o + 8 <= n_wr_i[k]; o += 8) begin
        real si, sq, mag, ph, e_ph, n_mid;
        int f;
        si = 0.0; sq = 0.0;
        for (int j = 0; j < 8; j++) begin si += out_i[k][o + j]; sq += out_q[k][o + j]; end
        si /= 8.0; sq /= 8.0;
        mag = $sqrt(si * si + sq * sq);
        ph  = -$atan2(sq, si);
        n_mid = real'(4 * o) + 12.5;
        f = int'(n_mid) / NS;
        e_ph = expected_psi(k, f, n_mid - real'(f * NS));
        check(mag > 0.96 * AMPL / 2.0 && mag < 1.04 * AMPL / 2.0,
              $sformatf("ch %0d window %0d amplitude %f", k, o, mag));
        check(wrap_pi(ph - e_ph) < 0.04 && wrap_pi(ph - e_ph) > -0.04,
              $sformatf("ch %0d window %0d phase %f vs %f", k, o, ph, e_ph));
      end
    end

    // ---- user reads: the complex vector of all channels at one time ----
    begin
      logic [15:0] ri [NCH][512], rq [NCH][512];
      for (int a = 0; a < 512; a++) begin
        @(negedge clk); read = 1'b1; user_time = 9'(a);
        @(negedge clk); read = 1'b0;
        n_reads++;
        for (int k = 0; k < NCH; k++) begin
          ri[k][a] = iq_user[k].i; rq[k][a] = iq_user[k].q;
          if (written[k][a])
            check(ri[k][a] == mem_i[k][a] && rq[k][a] == mem_q[k][a],
                  $sformatf("ch %0d slot %0d user read", k, a));
        end
      end
      for (int a = 0; a + 8 <= 512; a += 8) begin
        bit all_written;
        real p0;
        all_written = 1'b1; p0 = 0.0;
        // compare only slots that every channel last wrote at the same
        // true time (the buffer keeps 341 ms; later channels lap earlier)
        for (int k = 0; k < NCH; k++) for (int j = 0; j < 8; j++) begin
          all_written &= written[k][a + j];
          if (all_written) all_written &= (slot_t[k][a + j] - slot_t[0][a + j] < 2.0e-3) &&
                                          (slot_t[0][a + j] - slot_t[k][a + j] < 2.0e-3);
        end
        if (all_written) n_vec++;
        if (!all_written) continue;
        for (int k = 0; k < NCH; k++) begin
          real si, sq, ph;
          si = 0.0; sq = 0.0;
          for (int j = 0; j < 8; j++) begin
            si += real'($signed(ri[k][a + j])); sq += real'($signed(rq[k][a + j]));
          end
          ph = -$atan2(sq, si);
          if (k == 0) p0 = ph;
          else check(wrap_pi(ph - p0 - (PH[k] - PH[0])) < 0.04 && wrap_pi(ph - p0 - (PH[k] - PH[0])) > -0.04,
                     $sformatf("slots %0d..%0d: ch %0d relative phase %f vs %f", a, a + 7, k,
                               wrap_pi(ph - p0), wrap_pi(PH[k] - PH[0])));
        end
      end
    end

    // ---- fixed latency from the first byte to the first write ----
    foreach (first_wr_lat[i])
      check(first_wr_lat[i] == 56, $sformatf("first write latency %0d", first_wr_lat[i]));

    // ---- every mechanism happened ----
    $display("mechanisms: loads=%0d header_bytes=%0d trailer_bytes=%0d cos_cycles=%0d sin_cycles=%0d",
             n_load, n_hdr, n_trail, n_cos, n_sin);
    $display("mechanisms: I_writes=%0d Q_writes=%0d buffer_wraps=%0d timer_wraps=%0d restamps=%0d user_reads=%0d",
             n_wr_i[0] + n_wr_i[1] + n_wr_i[2] + n_wr_i[3], n_wr_q[0] + n_wr_q[1] + n_wr_q[2] + n_wr_q[3],
             n_buf_wrap, n_timer_wrap, n_restamp, n_reads);
    check(n_load == NCH * N_FRAMES, "frame loads");
    check(n_hdr == NCH * N_FRAMES * 44, "header bytes skipped");
    check(n_trail == NCH * N_FRAMES * 4, "trailer bytes dropped");
    check(n_cos == NCH * N_FRAMES * NS && n_sin == n_cos, "cosine and sine cycles");
    check(n_buf_wrap > 0, "cyclical buffer wrapped");
    check(n_timer_wrap > 0, "reference timer wrapped");
    check(n_restamp > 0, "time line corrected at a frame start");
    check(n_reads == 512, "user reads");
    check(n_vec > 20, $sformatf("aligned measurement vectors compared: %0d", n_vec));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (9_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
