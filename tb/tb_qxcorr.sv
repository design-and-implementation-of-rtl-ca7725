// tb_qxcorr: checks the quantized cross-correlator against a direct complex sum.
//
// Random coefficients (each component 0 or +/-1, 2, 4, 8) are written through the load port, then
// random full-scale samples are streamed. After every clock the testbench recomputes
// Lambda = sum_m q*(m) * x[n-63+m] from its own copies of the samples and coefficients and compares
// lam_re/lam_im exactly and mag_sq one clock later. A second coefficient set is loaded mid-run to
// check reprogramming, and a clock with en low must hold the chain.
module tb_qxcorr;
  import sync_pkg::*;

  localparam int NS = 400;
  logic clk = 1'b0, rst_n = 1'b0, en;
  logic signed [11:0] xr, xi;
  logic coef_we;
  logic [5:0] coef_addr;
  qcoef_t coef_data;
  logic signed [22:0] lam_re, lam_im;
  logic [45:0] mag_sq;
  longint hr [NS], hi [NS];
  longint cr [64], ci [64];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  qxcorr dut (.clk, .rst_n, .en, .x_re(xr), .x_im(xi), .coef_we, .coef_addr, .coef_data,
              .lam_re, .lam_im, .mag_sq);

  function automatic qlevel_t rand_level(output longint v);
    qlevel_t q;
    q.zero  = ($urandom % 5 == 0);
    q.neg   = 1'($urandom);
    q.shift = 2'($urandom);
    v = q.zero ? 0 : (q.neg ? -(longint'(1) << q.shift) : (longint'(1) << q.shift));
    return q;
  endfunction

  task automatic load_coefs();
    for (int m = 0; m < 64; m++) begin
      @(negedge clk);
      xr = '0; xi = '0;
      coef_we = 1'b1;
      coef_addr = 6'(m);
      coef_data.re = rand_level(cr[m]);
      coef_data.im = rand_level(ci[m]);
    end
    @(negedge clk);
    coef_we = 1'b0;
  endtask

  function automatic longint at(input longint h [NS], input int k);
    return (k < 0) ? 0 : h[k];
  endfunction

  initial begin
    longint pr_re = 0, pr_im = 0;
    en = 1'b1; xr = '0; xi = '0; coef_we = 1'b0; coef_addr = '0; coef_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    load_coefs();
    for (int n = 0; n < NS; n++) begin
      automatic longint er = 0, ei = 0;
      if (n == 250) load_coefs();    // chain keeps running with x = 0 while loading
      @(negedge clk);
      xr = (n < 20) ? 12'sh800 : 12'($urandom);
      xi = (n < 20) ? 12'sh7ff : 12'($urandom);
      hr[n] = xr; hi[n] = xi;
      if (n >= 250) begin
        // samples before the reload were followed by 65 zero samples: restart the history
        for (int k = 0; k < 250; k++) begin hr[k] = 0; hi[k] = 0; end
      end
      @(posedge clk); #1;
      checks++;
      if (n != 250 && mag_sq != 46'(pr_re*pr_re + pr_im*pr_im)) begin
        failures++; if (failures < 10) $display("mag n=%0d", n);
      end
      for (int m = 0; m < 64; m++) begin
        automatic longint a = cr[m], b = ci[m];
        automatic longint sr = at(hr, n-63+m), si = at(hi, n-63+m);
        er += a*sr - b*si;
        ei += a*si + b*sr;
      end
      checks++;
      if (lam_re != er || lam_im != ei) begin
        failures++;
        if (failures < 10) $display("n=%0d got %0d,%0d expected %0d,%0d", n, lam_re, lam_im, er, ei);
      end
      pr_re = er; pr_im = ei;
    end
    // en low: chain holds
    @(negedge clk);
    en = 1'b0; xr = 12'sd100; xi = -12'sd77;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (lam_re != pr_re || lam_im != pr_im) begin failures++; $display("chain moved with en low"); end
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
