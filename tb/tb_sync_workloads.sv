// tb_sync_workloads: the synchronizer over the evaluation conditions: carrier offsets of 0, 100 and
// 200 kHz, two multipath channels (office, 50 ns delay spread; large open space, 150 ns) and
// signal-to-noise ratios of 10 and 20 dB, with TRIALS random channels per condition.
//
// Channel: a static tapped delay line with one tap per 50 ns sample. The tap powers are the ETSI A
// and ETSI C power-delay profiles with each path added into the sample bin floor(delay / 50 ns);
// every trial draws independent complex Gaussian tap gains with those powers (normalised to unit
// total power). Complex white Gaussian noise (Box-Muller from a xorshift generator) sets the SNR relative to
// the preamble power. The preamble and the quantized long-symbol coefficients are built as in
// tb_ofdm_sync_top.
//
// Per condition it reports detections, the largest coarse (16-sample) frequency error read once
// near the end of the short symbols, the largest fine (64-sample) error where the offset is inside
// the fine range, the number of fine timing errors (peak position minus the end of long symbol 1)
// within +-8 samples and the variance of those. Checks, with margins for this channel approximation:
//   * every packet at 20 dB and at least 90 % at 10 dB is detected (a deep fade can hide one);
//   * coarse frequency error below 50 kHz at 20 dB (at 10 dB a single 16-sample window in a deep
//     fade can be far off, so it is reported only); fine error below 10 kHz where |f| < 156 kHz;
//   * for 0 and 100 kHz, at least 90 % (20 dB) or 40 % (10 dB) of fine timing errors within +-8
//     samples, and the variance of those below 5 samples^2; at 200 kHz the long-symbol
//     correlation peak is weakened and the fine timing is only reported.
//   * at 20 dB, every dropoff point lies between preamble samples 120 and 200. At 10 dB the
//     normalized metric sometimes dips below one half during the short symbols, so the dropoff
//     can come early and the fine search window then misses the peak; this is reported only.
// Random numbers come from a 32-bit xorshift generator with a fixed start value, so every run
// sees the same channels and noise.
module tb_sync_workloads;
  import sync_pkg::*;

  localparam real TWO_PI = 6.283185307179586;
  localparam real AMP    = 60.0;
  localparam int  TRIALS = 20;

  logic clk = 1'b0, rst_n = 1'b0, agc_done;
  sample_t x;
  fo_sel_e fo_sel;
  logic coef_we;
  logic [5:0] coef_addr;
  qcoef_t coef_data;
  logic pd, f_off_ready, t_coarse_valid, t_fine_valid;
  logic signed [31:0] f_off;
  logic [7:0] t_off_coarse;
  logic [6:0] t_off_fine;

  real sts_re [64], sts_im [64], lts_re [64], lts_im [64];
  real tap_pow [22];
  real h_re [22], h_im [22];
  real hist_re [22], hist_im [22];
  int  ntaps;
  int  checks = 0, failures = 0;
  int  n = 0;

  always #5 clk = ~clk;

  ofdm_sync_top dut (
    .clk, .rst_n, .agc_done, .x, .fo_sel, .coef_we, .coef_addr, .coef_data,
    .pd, .f_off, .f_off_ready, .t_off_coarse, .t_coarse_valid, .t_off_fine, .t_fine_valid
  );

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  logic [31:0] rng = 32'h2545_F491;

  function automatic logic [31:0] next_rand();
    rng ^= rng << 13;
    rng ^= rng >> 17;
    rng ^= rng << 5;
    return rng;
  endfunction

  function automatic real urand01();
    return (real'(next_rand()) + 1.0) / 4294967297.0;
  endfunction

  // one N(0, 1) value
  function automatic real gauss();
    return $sqrt(-2.0 * $ln(urand01())) * $cos(TWO_PI * urand01());
  endfunction

  task automatic fail(input string msg);
    failures++;
    $display("FAIL: %s", msg);
  endtask

  task automatic build_symbols();
    int s_tab [53] = '{0,0,1,0,0,0,-1,0,0,0,1,0,0,0,-1,0,0,0,-1,0,0,0,1,0,0,0,
                       0,0,0,0,-1,0,0,0,-1,0,0,0,1,0,0,0,1,0,0,0,1,0,0,0,1,0,0};
    int l_tab [53] = '{1,1,-1,-1,1,1,-1,1,-1,1,1,1,1,1,1,-1,-1,1,1,-1,1,-1,1,1,1,1,
                       0,1,-1,-1,1,1,-1,1,-1,1,-1,-1,-1,-1,-1,1,1,-1,-1,1,-1,1,-1,1,1,1,1};
    real g = $sqrt(13.0/6.0);
    for (int t = 0; t < 64; t++) begin
      sts_re[t] = 0.0; sts_im[t] = 0.0; lts_re[t] = 0.0; lts_im[t] = 0.0;
      for (int i = 0; i < 53; i++) begin
        real ph = TWO_PI * real'(i - 26) * real'(t) / 64.0;
        sts_re[t] += g * real'(s_tab[i]) * ($cos(ph) - $sin(ph));
        sts_im[t] += g * real'(s_tab[i]) * ($cos(ph) + $sin(ph));
        lts_re[t] += real'(l_tab[i]) * $cos(ph);
        lts_im[t] += real'(l_tab[i]) * $sin(ph);
      end
    end
  endtask

  function automatic qlevel_t quantize(input real v, input real vmax);
    qlevel_t q;
    real a = fabs(8.0 * v / vmax);
    q.neg = (v < 0.0);
    q.zero = (a <= 0.5);
    q.shift = (a > 4.0) ? 2'd3 : (a > 2.0) ? 2'd2 : (a > 1.0) ? 2'd1 : 2'd0;
    return q;
  endfunction

  task automatic load_coefficients();
    real vmax = 0.0;
    for (int m = 0; m < 64; m++) begin
      if (fabs(lts_re[m]) > vmax) vmax = fabs(lts_re[m]);
      if (fabs(lts_im[m]) > vmax) vmax = fabs(lts_im[m]);
    end
    for (int m = 0; m < 64; m++) begin
      @(negedge clk);
      coef_we = 1'b1;
      coef_addr = 6'(m);
      coef_data.re = quantize(lts_re[m], vmax);
      coef_data.im = quantize(-lts_im[m], vmax);
    end
    @(negedge clk);
    coef_we = 1'b0;
  endtask

  // ETSI power-delay profiles binned to 50 ns samples (delays in ns, powers in dB).
  task automatic set_profile(input bit etsi_c);
    real da [18] = '{0,10,20,30,40,50,60,70,80,90,110,140,170,200,240,290,340,390};
    real pa [18] = '{0.0,-0.9,-1.7,-2.6,-3.5,-4.3,-5.2,-6.1,-6.9,-7.8,-4.7,-7.3,-9.9,-12.5,-13.7,-18.0,-22.4,-26.7};
    real dc [18] = '{0,10,20,30,50,80,110,140,180,230,280,330,400,490,600,730,880,1050};
    real pc [18] = '{-3.3,-3.6,-3.9,-4.2,0.0,-0.9,-1.7,-2.6,-1.5,-3.0,-4.4,-5.9,-5.3,-7.9,-9.4,-13.2,-16.3,-21.2};
    real tot = 0.0;
    for (int k = 0; k < 22; k++) tap_pow[k] = 0.0;
    ntaps = 0;
    for (int i = 0; i < 18; i++) begin
      int b = etsi_c ? int'($floor(dc[i] / 50.0)) : int'($floor(da[i] / 50.0));
      tap_pow[b] += $pow(10.0, (etsi_c ? pc[i] : pa[i]) / 10.0);
      if (b + 1 > ntaps) ntaps = b + 1;
    end
    for (int k = 0; k < ntaps; k++) tot += tap_pow[k];
    for (int k = 0; k < ntaps; k++) tap_pow[k] /= tot;
  endtask

  task automatic draw_channel();
    for (int k = 0; k < ntaps; k++) begin
      h_re[k] = gauss() * $sqrt(tap_pow[k] / 2.0);
      h_im[k] = gauss() * $sqrt(tap_pow[k] / 2.0);
      hist_re[k] = 0.0; hist_im[k] = 0.0;
    end
  endtask

  function automatic logic signed [11:0] clip(input real v);
    int i = $rtoi(v);
    if (i > 2047) i = 2047;
    if (i < -2048) i = -2048;
    return 12'(i);
  endfunction

  // Pass one transmitted sample through the channel, add noise, drive it.
  task automatic send(input real re, input real im, input real sigma);
    real yr = 0.0, yi = 0.0;
    for (int k = ntaps - 1; k > 0; k--) begin hist_re[k] = hist_re[k-1]; hist_im[k] = hist_im[k-1]; end
    hist_re[0] = re; hist_im[0] = im;
    for (int k = 0; k < ntaps; k++) begin
      yr += h_re[k] * hist_re[k] - h_im[k] * hist_im[k];
      yi += h_re[k] * hist_im[k] + h_im[k] * hist_re[k];
    end
    @(negedge clk);
    x.re = clip(yr + sigma * gauss());
    x.im = clip(yi + sigma * gauss());
    n++;
  endtask

  task automatic preamble_sample(input int t, output real re, output real im);
    if (t < 160) begin re = sts_re[t % 16]; im = sts_im[t % 16]; end
    else if (t < 192) begin re = lts_re[t - 160 + 32]; im = lts_im[t - 160 + 32]; end
    else begin re = lts_re[(t - 192) % 64]; im = lts_im[(t - 192) % 64]; end
  endtask

  // monitor
  int ps;
  real f_cur;
  bit pkt_active;
  int pd_rise, drop_end, fine_start, fine_idx;
  real coarse_err, fine_err;
  int got_coarse, got_fine;
  bit pd_q;

  always @(posedge clk) begin
    #1;
    if (rst_n && pkt_active) begin
      automatic int last = n - 1;
      automatic int wend = last - 21;
      if (!pd_q && pd && pd_rise < 0 && last >= ps) pd_rise = last;
      pd_q = pd;
      if (dut.u_drop.done && drop_end < 0 && pd_rise >= 0) begin
        drop_end = last;
        fine_start = last + 1;
      end
      if (dut.u_max.done && fine_idx < 0 && fine_start >= 0) fine_idx = t_off_fine;
      if (f_off_ready) begin
        if (dut.u_foe.ctx_out.sel == FO_COARSE_16 && wend >= ps + 128 && wend <= ps + 159) begin
          got_coarse++;
          coarse_err = fabs(real'(f_off) - f_cur);
        end
        if (dut.u_foe.ctx_out.sel == FO_FINE_64 && wend >= ps + 287 && wend <= ps + 319) begin
          got_fine++;
          if (fabs(real'(f_off) - f_cur) > fine_err) fine_err = fabs(real'(f_off) - f_cur);
        end
      end
    end else pd_q = pd;
  end

  task automatic run_condition(input bit etsi_c, input real f, input real snr_db);
    real sigma = $sqrt(AMP * AMP * 52.0 / $pow(10.0, snr_db / 10.0) / 2.0);
    int det = 0, fine_n = 0, fine_ok = 0, drop_bad = 0;
    real max_c = 0.0, max_f = 0.0, sum_t = 0.0, sum_t2 = 0.0, mean_t, var_t;
    set_profile(etsi_c);
    for (int tr = 0; tr < TRIALS; tr++) begin
      real re, im, c, s, ph;
      draw_channel();
      for (int t = 0; t < 120; t++) send(0.0, 0.0, sigma);
      ps = n; f_cur = f;
      pd_rise = -1; drop_end = -1; fine_start = -1; fine_idx = -1;
      coarse_err = 0.0; fine_err = 0.0; got_coarse = 0; got_fine = 0;
      fo_sel = FO_COARSE_16;
      pkt_active = 1'b1;
      for (int t = 0; t < 320; t++) begin
        preamble_sample(t, re, im);
        ph = TWO_PI * f * real'(t) * 50.0e-9;
        c = $cos(ph); s = $sin(ph);
        if (t == 200) fo_sel = FO_FINE_64;
        send(AMP * (re * c - im * s), AMP * (re * s + im * c), sigma);
      end
      for (int t = 0; t < 120; t++) begin
        ph = TWO_PI * f * real'(t + 320) * 50.0e-9 + TWO_PI * real'(next_rand() % 4) / 4.0 + TWO_PI / 8.0;
        send(AMP * 7.2 * $cos(ph), AMP * 7.2 * $sin(ph), sigma);
      end
      pkt_active = 1'b0;
      fo_sel = FO_COARSE_16;
      for (int t = 0; t < 120; t++) send(0.0, 0.0, sigma);
      if (pd_rise >= ps && pd_rise < ps + 160 && fine_idx >= 0) begin
        real terr = real'(fine_start + fine_idx - 2 - (ps + 255));
        det++;
        if (got_coarse > 0 && coarse_err > max_c) max_c = coarse_err;
        if (got_fine > 0 && fine_err > max_f) max_f = fine_err;
        if (drop_end < ps + 120 || drop_end > ps + 200) drop_bad++;
        fine_n++;
        if (terr >= -8.0 && terr <= 8.0) begin
          fine_ok++;
          sum_t += terr; sum_t2 += terr * terr;
        end
      end
    end
    mean_t = (fine_ok > 0) ? sum_t / fine_ok : 0.0;
    var_t  = (fine_ok > 1) ? (sum_t2 - fine_ok * mean_t * mean_t) / (fine_ok - 1) : 0.0;
    $display("ETSI %s f=%4.0f kHz SNR=%2.0f dB: detected %0d/%0d, coarse err max %5.0f Hz, fine err max %5.0f Hz, fine timing within +-8: %0d (mean %5.2f var %5.2f), dropoff outside 120..200: %0d",
             etsi_c ? "C" : "A", f / 1.0e3, snr_db, det, TRIALS, max_c, max_f, fine_ok, mean_t, var_t, drop_bad);
    checks += 5;
    if (snr_db >= 20.0 ? (det < TRIALS) : (det * 10 < TRIALS * 9)) fail("detection rate");
    if (snr_db >= 20.0 && max_c > 50.0e3) fail("coarse frequency error");
    if (fabs(f) < 156.0e3 && max_f > 10.0e3) fail("fine frequency error");
    if (fabs(f) < 156.0e3 && fine_ok * 10 < fine_n * (snr_db >= 20.0 ? 9 : 4)) fail("fine timing outside +-8");
    if (fabs(f) < 156.0e3 && var_t > 5.0) fail("fine timing variance");
    if (snr_db >= 20.0) begin
      checks++;
      if (drop_bad > 0) fail("dropoff point");
    end
  endtask

  initial begin
    real offs [3] = '{0.0, 100.0e3, 200.0e3};
    x = '0; agc_done = 1'b1; fo_sel = FO_COARSE_16; coef_we = 1'b0; coef_addr = '0; coef_data = '0;
    pkt_active = 1'b0; pd_q = 1'b0; ntaps = 1; ps = 0;
    build_symbols();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    load_coefficients();
    for (int ch = 0; ch < 2; ch++)
      for (int fi = 0; fi < 3; fi++) begin
        run_condition(ch == 1, offs[fi], 20.0);
        run_condition(ch == 1, offs[fi], 10.0);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
