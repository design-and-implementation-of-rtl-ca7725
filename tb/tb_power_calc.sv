// tb_power_calc: checks the sliding-window power against a direct sum of |x|^2 over the newest
// L samples, for L = 16 and L = 64, with random and extreme inputs.
module tb_power_calc;
  localparam int NS = 500;
  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [11:0] xr, xi;
  logic [27:0] p16;
  logic [29:0] p64;
  longint e [NS];
  int n, checks = 0, failures = 0;

  always #5 clk = ~clk;

  power_calc #(.L(16)) dut16 (.clk, .rst_n, .x_re(xr), .x_im(xi), .p(p16));
  power_calc #(.L(64)) dut64 (.clk, .rst_n, .x_re(xr), .x_im(xi), .p(p64));

  task automatic check(input int L, input longint got, input int last);
    longint ex = 0;
    for (int k = last - L + 1; k <= last; k++) if (k >= 0) ex += e[k];
    checks++;
    if (got != ex) begin
      failures++;
      if (failures < 10) $display("L=%0d n=%0d got %0d expected %0d", L, last, got, ex);
    end
  endtask

  initial begin
    xr = '0; xi = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (n = 0; n < NS; n++) begin
      @(negedge clk);
      if (n < 70) begin xr = 12'sh800; xi = 12'sh800; end
      else        begin xr = 12'($urandom); xi = 12'($urandom); end
      e[n] = longint'(xr)*longint'(xr) + longint'(xi)*longint'(xi);
      @(posedge clk); #1;
      check(16, longint'(p16), n);
      check(64, longint'(p64), n);
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
