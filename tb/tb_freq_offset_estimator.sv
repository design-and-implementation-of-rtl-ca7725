// tb_freq_offset_estimator: checks the frequency estimate in all four quadrants and both modes.
//
// The testbench drives the auto-correlation inputs directly with R = A * exp(j*2*pi*f*L/Fs) for a
// set of offsets f, with L = 16 (coarse, input selector 0) or L = 64 (fine, selector 1). Offsets
// are chosen so that the correlation angle lands in every quadrant (e.g. +100 kHz on the 64-sample
// correlation is 0.32 of a turn, in the second quadrant). After each change the first result,
// which may belong to a conversion begun before the change, is skipped and the next is compared
// with f within 20 Hz. It also checks the 21-clock latency from enable to the first result and
// the 20-clock result period.
module tb_freq_offset_estimator;
  import sync_pkg::*;

  localparam real TWO_PI = 6.283185307179586;
  logic clk = 1'b0, rst_n = 1'b0, en;
  fo_sel_e sel;
  logic signed [28:0] r16_re, r16_im;
  logic signed [30:0] r64_re, r64_im;
  logic signed [31:0] f_off;
  logic ready;
  int checks = 0, failures = 0;
  int quad_seen [4];

  always #5 clk = ~clk;

  freq_offset_estimator dut (.clk, .rst_n, .en, .sel, .r16_re, .r16_im, .r64_re, .r64_im,
                             .f_off, .ready);

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic set_offset(input real f, input fo_sel_e s, input real amp);
    real ph16, ph64;
    ph16 = TWO_PI * f * 16.0 / 20.0e6;
    ph64 = TWO_PI * f * 64.0 / 20.0e6;
    r16_re = 29'($rtoi(amp * $cos(ph16)));
    r16_im = 29'($rtoi(amp * $sin(ph16)));
    r64_re = 31'($rtoi(4.0 * amp * $cos(ph64)));
    r64_im = 31'($rtoi(4.0 * amp * $sin(ph64)));
    sel = s;
  endtask

  task automatic expect_offset(input real f, input fo_sel_e s);
    int last = -1, c = 0, got = 0;
    real ph;
    @(negedge clk);
    set_offset(f, s, 1.0e8);
    ph = f * ((s == FO_FINE_64) ? 64.0 : 16.0) / 20.0e6;     // in turns
    ph = ph - $floor(ph + 0.5);
    quad_seen[(ph >= 0.0) ? ((ph < 0.25) ? 0 : 1) : ((ph < -0.25) ? 2 : 3)]++;
    while (got < 3) begin
      @(posedge clk); #1; c++;
      if (ready) begin
        got++;
        if (got >= 2) begin
          checks += 2;
          if (fabs(real'(f_off) - f) > 20.0) begin
            failures++;
            $display("f=%f sel=%0d: got %0d Hz", f, s, f_off);
          end
          if (c - last != 20) begin failures++; $display("period %0d", c - last); end
        end
        last = c;
      end
    end
  endtask

  initial begin
    int c;
    en = 1'b0;
    set_offset(100.0e3, FO_COARSE_16, 1.0e8);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    en = 1'b1;
    c = 0;
    do begin @(posedge clk); #1; c++; end while (!ready && c < 100);
    checks += 2;
    if (c != 21) begin failures++; $display("latency %0d", c); end
    if (fabs(real'(f_off) - 100.0e3) > 20.0) begin failures++; $display("first %0d", f_off); end

    // coarse: range +/-625 kHz
    expect_offset(0.0,      FO_COARSE_16);
    expect_offset(100.0e3,  FO_COARSE_16);
    expect_offset(200.0e3,  FO_COARSE_16);
    expect_offset(-100.0e3, FO_COARSE_16);
    expect_offset(-200.0e3, FO_COARSE_16);
    expect_offset(500.0e3,  FO_COARSE_16);   // second quadrant
    expect_offset(-600.0e3, FO_COARSE_16);   // third quadrant
    expect_offset(-20.0e3,  FO_COARSE_16);
    // fine: range +/-156.25 kHz
    expect_offset(30.0e3,   FO_FINE_64);
    expect_offset(100.0e3,  FO_FINE_64);     // second quadrant
    expect_offset(-150.0e3, FO_FINE_64);     // third quadrant
    expect_offset(-50.0e3,  FO_FINE_64);
    expect_offset(3.5e3,    FO_FINE_64);
    for (int q = 0; q < 4; q++) begin
      checks++;
      if (quad_seen[q] == 0) begin failures++; $display("quadrant %0d never used", q); end
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
