// tb_ofdm_sync_top: end-to-end test of the synchronizer on generated 802.11a preambles.
//
// The testbench builds the preamble itself: the short symbol is the 64-point inverse DFT of the
// 12 nonzero short-training subcarriers (+/-(1+j)*sqrt(13/6)), repeated ten times (160 samples);
// the long symbol is the inverse DFT of the 52 +/-1 long-training subcarriers, preceded by its last
// 32 samples as guard interval and sent twice (160 samples). Windowing is omitted. A carrier
// offset f is applied as exp(j*2*pi*f*n*Ts), small uniform noise is added, and each preamble is
// followed by random data-like samples and then noise. The cross-correlator coefficients are the
// conjugated long symbol quantized to 0, +/-1, 2, 4, 8 by q = Q(8*c*/max|c|), where Q rounds the
// magnitude up to a power of two and maps magnitudes of 0.5 or less to 0.
//
// Per packet it checks: pd rises inside the short training sequence; the coarse frequency
// estimate from the 16-sample correlation (selector 0) and the fine estimate from the
// 64-sample correlation over the long symbols (selector 1) are close to f; the dropoff point
// falls at the end of the short training sequence; the fine timing points at the end of the first
// long symbol. It also sends one preamble while agc_done is low (must not be detected) and a
// spike train that the averager must reject, and counts each mechanism: detection, averager
// rejection, AGC gating, coarse and fine estimation, quadrants of the correlation angle,
// dropoff, and maximum detection.
module tb_ofdm_sync_top;
  import sync_pkg::*;

  localparam real TWO_PI = 6.283185307179586;
  localparam real AMP    = 60.0;
  localparam int  NPKT   = 4;

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
  int checks = 0, failures = 0;
  int n = 0;                       // index of the sample consumed at the next clock edge
  // mechanism counters
  int cnt_detect = 0, cnt_reject = 0, cnt_agc_gate = 0, cnt_coarse_f = 0, cnt_fine_f = 0;
  int cnt_dropoff = 0, cnt_maxdet = 0;
  int quad [4];

  always #5 clk = ~clk;

  ofdm_sync_top dut (
    .clk, .rst_n, .agc_done, .x, .fo_sel, .coef_we, .coef_addr, .coef_data,
    .pd, .f_off, .f_off_ready, .t_off_coarse, .t_coarse_valid, .t_off_fine, .t_fine_valid
  );

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic fail(input string msg);
    failures++;
    $display("FAIL: %s", msg);
  endtask

  // Short and long training subcarriers for k = -26 .. 26.
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
        // short: S_k = s * (1 + j) * sqrt(13/6)
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
      coef_data.im = quantize(-lts_im[m], vmax);    // conjugate
    end
    @(negedge clk);
    coef_we = 1'b0;
  endtask

  // Drive one sample (value already scaled) and advance one clock.
  task automatic send(input real re, input real im, input int noise);
    @(negedge clk);
    x.re = 12'($rtoi(re) + $signed($urandom_range(2*noise, 0)) - noise);
    x.im = 12'($rtoi(im) + $signed($urandom_range(2*noise, 0)) - noise);
    n++;
  endtask

  // Sample t of the preamble (0 .. 319), before the frequency offset.
  task automatic preamble_sample(input int t, output real re, output real im);
    if (t < 160) begin re = sts_re[t % 16]; im = sts_im[t % 16]; end
    else if (t < 192) begin re = lts_re[t - 160 + 32]; im = lts_im[t - 160 + 32]; end
    else begin re = lts_re[(t - 192) % 64]; im = lts_im[(t - 192) % 64]; end
  endtask

  // Monitor state for the packet under test
  int ps;                            // index of the first preamble sample
  real f_cur;
  bit  pkt_active;
  int  pd_rise, drop_end, fine_start, fine_idx;
  int  got_coarse, got_fine;
  real coarse_err, fine_err;
  bit  pd_q;

  // Runs after each clock edge; the edge just consumed sample n-1.
  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      automatic int last = n - 1;
      if (!pd_q && pd && pkt_active && pd_rise < 0) pd_rise = last;
      pd_q = pd;
      if (dut.metric && !pd && agc_done) cnt_reject++;
      if (dut.u_drop.done && pkt_active && drop_end < 0) begin
        drop_end = last;
        fine_start = last + 1;       // max detector samples its start at the next edge
      end
      if (dut.u_max.done && pkt_active && fine_idx < 0 && fine_start >= 0) fine_idx = t_off_fine;
      if (f_off_ready && pkt_active) begin
        automatic int wend = last - 21;   // newest sample of the correlation it used
        automatic real ph;
        if (fo_sel == FO_COARSE_16 && dut.u_foe.ctx_out.sel == FO_COARSE_16 &&
            wend >= ps + 40 && wend <= ps + 159) begin
          got_coarse++;
          if (fabs(real'(f_off) - f_cur) > coarse_err) coarse_err = fabs(real'(f_off) - f_cur);
        end
        if (dut.u_foe.ctx_out.sel == FO_FINE_64 && wend >= ps + 287 && wend <= ps + 319) begin
          got_fine++;
          fine_err = fabs(real'(f_off) - f_cur);
        end
      end
    end
  end

  task automatic packet(input real f, input bit with_agc);
    real re, im, c, s, ph;
    agc_done = with_agc;
    fo_sel = FO_COARSE_16;
    ps = n + 1;                     // the first preamble sample is the next one sent... adjusted below
    ps = n;
    f_cur = f;
    pkt_active = with_agc;
    pd_rise = -1; drop_end = -1; fine_start = -1; fine_idx = -1;
    got_coarse = 0; got_fine = 0; coarse_err = 0.0; fine_err = 1.0e9;
    for (int t = 0; t < 320; t++) begin
      preamble_sample(t, re, im);
      ph = TWO_PI * f * real'(t) * 50.0e-9;
      c = $cos(ph); s = $sin(ph);
      if (t == 200) fo_sel = FO_FINE_64;
      send(AMP * (re * c - im * s), AMP * (re * s + im * c), 12);
    end
    for (int t = 0; t < 200; t++) begin
      ph = TWO_PI * real'($urandom_range(3, 0)) / 4.0 + TWO_PI / 8.0;
      send(400.0 * $cos(ph), 400.0 * $sin(ph), 12);
    end
    for (int t = 0; t < 150; t++) send(0.0, 0.0, 12);
    fo_sel = FO_COARSE_16;
    if (!with_agc) begin
      checks++;
      if (pd_rise >= 0) fail("packet detected while agc_done low");
      else cnt_agc_gate++;
      agc_done = 1'b1;
      pkt_active = 1'b0;
      return;
    end
    pkt_active = 1'b0;
    $display("f=%0.0f: pd at %0d, coarse err %0.0f Hz (%0d), fine err %0.0f Hz (%0d), drop at %0d, t_fine %0d (start %0d)",
             f, pd_rise - ps, coarse_err, got_coarse, fine_err, got_fine, drop_end - ps, fine_idx,
             fine_start - ps);
    checks += 6;
    if (pd_rise < ps + 16 || pd_rise > ps + 120) fail("pd not raised inside the short training sequence");
    else cnt_detect++;
    if (got_coarse == 0 || coarse_err > 3000.0) fail("coarse frequency estimate");
    else cnt_coarse_f++;
    if (got_fine == 0 || fine_err > 1000.0) fail("fine frequency estimate");
    else cnt_fine_f++;
    if (drop_end < ps + 160 || drop_end > ps + 185) fail("dropoff point");
    else cnt_dropoff++;
    if (fine_idx < 0 || fine_start + fine_idx < ps + 255 || fine_start + fine_idx > ps + 259)
      fail("fine timing point");
    else cnt_maxdet++;
    checks++;
    if (int'(t_off_coarse) != 0) fail("coarse output not released after hold");
    begin
      real pc = f * 16.0 / 20.0e6, pf = f * 64.0 / 20.0e6;
      pc = pc - $floor(pc + 0.5);
      pf = pf - $floor(pf + 0.5);
      quad[(pc >= 0.0) ? ((pc < 0.25) ? 0 : 1) : ((pc < -0.25) ? 2 : 3)]++;
      quad[(pf >= 0.0) ? ((pf < 0.25) ? 0 : 1) : ((pf < -0.25) ? 2 : 3)]++;
    end
  endtask

  initial begin
    x = '0; agc_done = 1'b1; fo_sel = FO_COARSE_16; coef_we = 1'b0; coef_addr = '0; coef_data = '0;
    pkt_active = 1'b0; pd_q = 1'b0;
    build_symbols();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    load_coefficients();
    for (int t = 0; t < 100; t++) send(0.0, 0.0, 12);
    // spike train: a 16-periodic burst too short for 8 of 32 decisions
    for (int r = 0; r < 6; r++) begin
      for (int t = 0; t < 36; t++) send(AMP * sts_re[t % 16], AMP * sts_im[t % 16], 12);
      for (int t = 0; t < 60; t++) send(0.0, 0.0, 12);
    end
    checks++;
    if (cnt_reject == 0) fail("averager never rejected a raw decision");
    packet(100.0e3, 1'b1);
    packet(-150.0e3, 1'b1);
    packet(60.0e3, 1'b0);
    packet(20.0e3, 1'b1);
    packet(-40.0e3, 1'b1);
    checks += 8;
    if (cnt_detect == 0)   fail("no packet detected");
    if (cnt_reject == 0)   fail("averager rejection never happened");
    if (cnt_agc_gate == 0) fail("AGC gating never exercised");
    if (cnt_coarse_f == 0) fail("no coarse frequency estimate");
    if (cnt_fine_f == 0)   fail("no fine frequency estimate");
    if (cnt_dropoff == 0)  fail("no dropoff detection");
    if (cnt_maxdet == 0)   fail("no maximum detection");
    if (quad[0] == 0 || quad[1] == 0 || quad[2] == 0 || quad[3] == 0) fail("a quadrant was never used");
    $display("mechanisms: detect=%0d reject=%0d agc_gate=%0d coarse_f=%0d fine_f=%0d dropoff=%0d maxdet=%0d quadrants=%0d/%0d/%0d/%0d",
             cnt_detect, cnt_reject, cnt_agc_gate, cnt_coarse_f, cnt_fine_f, cnt_dropoff, cnt_maxdet,
             quad[0], quad[1], quad[2], quad[3]);
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
