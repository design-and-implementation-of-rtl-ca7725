// tb_packet_detector: checks the comparator and averager of the packet detector.
//
// Input: low-level noise, then a 16-periodic burst (a random 16-sample pattern repeated, standing
// in for the short training sequence) plus noise, then noise again; a second burst arrives while
// agc_done is low and must not be detected. The testbench recomputes R16 and P16 from its own input
// record, derives the expected raw decision (2*|R|^2 > P^2, i.e. th = 0.5, gated by agc_done) and
// the expected 8-of-32 averaged flag, and compares r16, p16, metric and pd every clock.
module tb_packet_detector;
  import sync_pkg::*;

  localparam int NS = 900;
  logic clk = 1'b0, rst_n = 1'b0, agc_done;
  sample_t x;
  logic signed [28:0] r16_re, r16_im;
  logic [27:0] p16;
  logic metric, pd;
  longint hr [NS], hi [NS];
  bit agc [NS+1];
  bit mexp [NS];
  int checks = 0, failures = 0, det_burst = 0, det_noise = 0, det_gated = 0;
  logic signed [11:0] pat_re [16], pat_im [16];

  always #5 clk = ~clk;

  packet_detector dut (.clk, .rst_n, .agc_done, .x, .r16_re, .r16_im, .p16, .metric, .pd);

  function automatic longint at(input longint h [NS], input int k);
    return (k < 0) ? 0 : h[k];
  endfunction

  function automatic bit in_burst(input int k);
    return (k >= 200 && k < 360) || (k >= 600 && k < 760);
  endfunction

  task automatic fail(input string what, input int k);
    failures++;
    if (failures < 12) $display("mismatch %s at n=%0d", what, k);
  endtask

  initial begin
    for (int k = 0; k < 16; k++) begin
      pat_re[k] = 12'($signed(10'($urandom)));
      pat_im[k] = 12'($signed(10'($urandom)));
    end
    x = '0; agc_done = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NS; n++) begin
      automatic longint er = 0, ei = 0, ep = 0;
      automatic int ones = 0;
      @(negedge clk);
      agc_done = !(n >= 560 && n < 800);
      agc[n] = agc_done;
      x.re = 12'($signed(4'($urandom)));
      x.im = 12'($signed(4'($urandom)));
      if (in_burst(n)) begin
        x.re = x.re + pat_re[n % 16];
        x.im = x.im + pat_im[n % 16];
      end
      hr[n] = x.re; hi[n] = x.im;
      @(posedge clk); #1;
      for (int m = 0; m < 16; m++) begin
        automatic longint ar = at(hr, n-31+m), ai = at(hi, n-31+m);
        automatic longint br = at(hr, n-15+m), bi = at(hi, n-15+m);
        er += ar*br + ai*bi;
        ei += ar*bi - ai*br;
        ep += br*br + bi*bi;
      end
      // decision on window n is registered on the next edge, with agc_done of that edge
      mexp[n] = 2*(er*er + ei*ei) > ep*ep;
      checks += 2;
      if (r16_re != er || r16_im != ei) fail("r16", n);
      if (p16 != ep) begin fail("p16", n); if (failures < 4) $display("p16=%0d ep=%0d", p16, ep); end
      if (n >= 1) begin
        checks++;
        if (metric !== (mexp[n-1] && agc[n])) fail("metric", n);
      end
      for (int k = n - 32; k <= n - 1; k++) if (k >= 1) ones += int'(mexp[k-1] && agc[k]);
      checks++;
      if (pd !== (agc_done && ones >= 8)) fail("pd", n);
      if (pd && in_burst(n - 10) && agc_done) det_burst++;
      if (pd && !in_burst(n) && !in_burst(n - 40) && !in_burst(n - 80)) det_noise++;
      if (pd && !agc_done) det_gated++;
    end
    checks += 3;
    if (det_burst == 0) begin failures++; $display("burst never detected"); end
    if (det_noise != 0) begin failures++; $display("detections on noise: %0d", det_noise); end
    if (det_gated != 0) begin failures++; $display("detections without agc_done"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
