// tb_max_detector: checks the arg-max search over the 100 samples after a start pulse.
//
// Random magnitudes are presented every clock; for each run the testbench plants the largest
// value at a chosen index (including 0, 99, and a larger value at index 100 that lies outside the
// window and must be ignored), records the samples itself and compares t_off with its own arg-max
// (earliest index on ties). It also checks that the result appears 100 clocks after the start
// clock, that done pulses once, and that t_valid drops on a new start.
module tb_max_detector;
  logic clk = 1'b0, rst_n = 1'b0, start;
  logic [45:0] mag;
  logic [6:0] t_off;
  logic t_valid, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  max_detector dut (.clk, .rst_n, .start, .mag, .t_off, .t_valid, .done);

  task automatic run(input int peak_at, input bit ties);
    longint v [130];
    int exp_idx = 0, c = 0, got_c = -1, dones = 0;
    for (int k = 0; k < 130; k++) v[k] = longint'($urandom_range(1000000, 0));
    if (ties) for (int k = 0; k < 130; k++) v[k] = 5;
    if (peak_at >= 0) v[peak_at] = 2000000;
    v[100] = 64'd3000000;                 // outside the window
    for (int k = 1; k < 100; k++) if (v[k] > v[exp_idx]) exp_idx = k;
    @(negedge clk);
    start = 1'b1; mag = 46'(v[0]);
    for (c = 1; c < 130; c++) begin
      @(posedge clk); #1;
      if (c == 1) begin
        checks++;
        if (t_valid) begin failures++; $display("t_valid not cleared by start"); end
      end
      if (done) begin dones++; got_c = c; end
      @(negedge clk);
      start = 1'b0; mag = 46'(v[c]);
    end
    checks += 3;
    if (dones != 1) begin failures++; $display("%0d done pulses", dones); end
    if (got_c != 100) begin failures++; $display("result after %0d clocks", got_c); end
    if (!t_valid || t_off != 7'(exp_idx)) begin
      failures++; $display("peak %0d: got %0d expected %0d", peak_at, t_off, exp_idx);
    end
  endtask

  initial begin
    start = 1'b0; mag = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(0, 0);
    run(99, 0);
    run(88, 0);
    run(-1, 1);
    for (int k = 0; k < 20; k++) run($urandom_range(99, 0), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
