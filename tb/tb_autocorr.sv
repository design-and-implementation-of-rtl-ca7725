// tb_autocorr: checks the recursive lag-L auto-correlation against a direct sum.
//
// Random 12-bit samples (full scale, including the most negative value) are fed one per clock to
// a lag-16 instance and a lag-64 instance. After every clock the testbench recomputes
// R = sum_{m=0}^{L-1} conj(x[n-2L+1+m]) * x[n-L+1+m] from its own copy of the input history
// (zeros before the first sample) and compares both components exactly.
module tb_autocorr;
  import sync_pkg::*;

  localparam int NS = 600;
  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [11:0] xr, xi;
  logic signed [28:0] r16_re, r16_im;
  logic signed [30:0] r64_re, r64_im;
  longint hr [NS], hi [NS];
  int n = 0, checks = 0, failures = 0;

  always #5 clk = ~clk;

  autocorr #(.L(16)) dut16 (.clk, .rst_n, .x_re(xr), .x_im(xi), .r_re(r16_re), .r_im(r16_im));
  autocorr #(.L(64)) dut64 (.clk, .rst_n, .x_re(xr), .x_im(xi), .r_re(r64_re), .r_im(r64_im));

  function automatic longint at(input longint h [NS], input int k);
    return (k < 0) ? 0 : h[k];
  endfunction

  task automatic check(input int L, input longint got_re, input longint got_im, input int last);
    longint er = 0, ei = 0;
    for (int m = 0; m < L; m++) begin
      longint ar = at(hr, last-2*L+1+m), ai = at(hi, last-2*L+1+m);
      longint br = at(hr, last-L+1+m),   bi = at(hi, last-L+1+m);
      er += ar*br + ai*bi;
      ei += ar*bi - ai*br;
    end
    checks++;
    if (got_re != er || got_im != ei) begin
      failures++;
      if (failures < 10) $display("L=%0d n=%0d got %0d,%0d expected %0d,%0d", L, last, got_re, got_im, er, ei);
    end
  endtask

  initial begin
    xr = '0; xi = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (n = 0; n < NS; n++) begin
      @(negedge clk);
      if (n < 40)       begin xr = 12'sh800; xi = 12'sh800; end   // extreme values first
      else if (n < 300) begin xr = 12'($urandom); xi = 12'($urandom); end
      else              begin xr = 12'($signed(5'($urandom))); xi = 12'($signed(5'($urandom))); end
      hr[n] = xr; hi[n] = xi;
      @(posedge clk); #1;
      check(16, r16_re, r16_im, n);
      check(64, r64_re, r64_im, n);
    end
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
