// tb_pd_averager: checks the 8-of-32 filter against a count over the testbench's own record of
// the input bits. Bursts of isolated spikes (fewer than 8 in 32) must not set pd; a dense run
// must set it; random traffic exercises both edges.
module tb_pd_averager;
  localparam int NS = 1500;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_bit, pd;
  bit hist [NS];
  int n, checks = 0, failures = 0, spikes_rejected = 0, detections = 0;

  always #5 clk = ~clk;

  pd_averager dut (.clk, .rst_n, .in_bit, .pd);

  initial begin
    in_bit = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (n = 0; n < NS; n++) begin
      int ones;
      bit exp_pd;
      @(negedge clk);
      if (n < 400)       in_bit = (n % 5 == 0);           // 7 of 32 at most: a spike train
      else if (n < 500)  in_bit = 1'b1;                   // a packet
      else if (n < 700)  in_bit = 1'b0;
      else               in_bit = ($urandom % 4 == 0);
      hist[n] = in_bit;
      @(posedge clk); #1;
      ones = 0;
      for (int k = n - 31; k <= n; k++) if (k >= 0) ones += int'(hist[k]);
      exp_pd = (ones >= 8);
      checks++;
      if (pd !== exp_pd) begin
        failures++;
        if (failures < 10) $display("n=%0d ones=%0d pd=%0b", n, ones, pd);
      end
      if (n < 400 && in_bit && !pd) spikes_rejected++;
      if (pd) detections++;
    end
    checks++;
    if (spikes_rejected == 0 || detections == 0) failures++;
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
