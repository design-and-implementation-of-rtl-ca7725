// tb_dropoff_detector: checks the coarse-timing counter of the dropoff detector.
//
// For each case the packet-detected flag rises together with the comparator decision, the
// decision stays set for D more samples and then falls, so the count must be D. The testbench
// checks the value, the one-clock done pulse, the 16-sample hold of t_valid, that a second dropoff
// while pd stays high gives no second estimate, that the detector re-arms after pd falls, and that
// the count saturates at 255 when the decision never falls.
module tb_dropoff_detector;
  logic clk = 1'b0, rst_n = 1'b0;
  logic pd, metric;
  logic [7:0] t_off;
  logic t_valid, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dropoff_detector dut (.clk, .rst_n, .pd, .metric, .t_off, .t_valid, .done);

  task automatic packet(input int d, input bit drop);
    int dones = 0, valid_cycles = 0, value = -1;
    @(negedge clk);
    pd = 1'b1; metric = 1'b1;
    for (int c = 0; c < 400; c++) begin
      @(posedge clk); #1;
      if (done) begin dones++; value = t_off; end
      if (t_valid) begin
        valid_cycles++;
        checks++;
        if (t_off != 8'(value)) begin failures++; $display("t_off changed while valid"); end
      end
      @(negedge clk);
      if (drop && c == d) metric = 1'b0;
      if (c == d + 40) metric = 1'b1;     // a later rise and fall while pd stays high
      if (c == d + 45) metric = 1'b0;
    end
    checks += 3;
    if (dones != 1) begin failures++; $display("d=%0d: %0d done pulses", d, dones); end
    if (value != (drop ? d : 255)) begin failures++; $display("d=%0d: got %0d", d, value); end
    if (valid_cycles != 16) begin failures++; $display("d=%0d: valid for %0d", d, valid_cycles); end
    pd = 1'b0; metric = 1'b0;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    pd = 1'b0; metric = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    packet(0, 1'b1);
    packet(1, 1'b1);
    packet(144, 1'b1);
    packet(37, 1'b1);
    packet(176, 1'b1);
    packet(300, 1'b0);
    for (int k = 0; k < 5; k++) packet($urandom_range(250, 2), 1'b1);
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
