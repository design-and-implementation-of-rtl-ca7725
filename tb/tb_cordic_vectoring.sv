// tb_cordic_vectoring: checks the CORDIC angle and magnitude against $atan2 and sqrt.
//
// Random first-quadrant vectors (plus the two axes and the diagonal) are converted one at a time.
// The expected angle is atan2(y, x) in binary-angle units (2^24 per turn); the tolerance allows
// for the last iteration's residual and for truncation in the shifts. The magnitude must equal
// the CORDIC gain 1.64676 times the vector length within 0.05 %. The testbench also checks that a
// result takes exactly 20 clocks and that a permanently asserted start yields a result every 20
// clocks.
module tb_cordic_vectoring;
  import sync_pkg::*;

  localparam real TWO_PI = 6.283185307179586;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start;
  logic [19:0] x_in, y_in;
  logic busy, done;
  logic [23:0] angle;
  logic [21:0] mag;
  logic [0:0] tag_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cordic_vectoring dut (.clk, .rst_n, .start, .x_in, .y_in, .tag_in(1'b0),
                        .busy, .done, .angle, .mag, .tag_out);

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic convert(input int unsigned xv, input int unsigned yv);
    int cycles = 0;
    real exp_a, exp_m, len, tol;
    @(negedge clk);
    x_in = 20'(xv); y_in = 20'(yv); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    len   = $sqrt(real'(xv)*real'(xv) + real'(yv)*real'(yv));
    exp_a = $atan2(real'(yv), real'(xv)) / TWO_PI * 16777216.0;
    exp_m = 1.6467602581 * len;
    tol   = 16777216.0 / TWO_PI * (24.0 / len) + 16.0;
    checks += 3;
    if (cycles != 20) begin failures++; $display("latency %0d", cycles); end
    if (fabs(real'(angle) - exp_a) > tol) begin
      failures++; $display("angle (%0d,%0d): got %0d expected %f", xv, yv, angle, exp_a);
    end
    if (fabs(real'(mag) - exp_m) > exp_m * 0.0005 + 4.0) begin
      failures++; $display("mag (%0d,%0d): got %0d expected %f", xv, yv, mag, exp_m);
    end
  endtask

  initial begin
    int last_done, gaps_ok = 0;
    start = 1'b0; x_in = '0; y_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    convert(500000, 0);
    convert(0, 500000);
    convert(300000, 300000);
    convert(524288, 524288);
    for (int k = 0; k < 300; k++) begin
      int unsigned xv, yv;
      xv = $urandom_range(524288, 0);
      yv = $urandom_range(524288, 0);
      if (xv + yv < 8192) xv += 8192;
      convert(xv, yv);
    end
    // back-to-back: start held high
    @(negedge clk);
    x_in = 20'd400000; y_in = 20'd100000; start = 1'b1;
    last_done = -1;
    for (int c = 0; c < 200; c++) begin
      @(posedge clk); #1;
      if (done) begin
        if (last_done >= 0) begin
          checks++;
          if (c - last_done != 20) begin failures++; $display("period %0d", c - last_done); end
          else gaps_ok++;
        end
        last_done = c;
      end
    end
    checks++;
    if (gaps_ok < 5) failures++;
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
