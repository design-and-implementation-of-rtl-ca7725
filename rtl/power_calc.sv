// power_calc: sliding-window received power P(d) = sum_{m=0}^{L-1} |r[d+m+L]|^2.
//
// Each clock the instantaneous power |x[n]|^2 = re^2 + im^2 of the incoming sample is added to a
// running sum and the value that entered L clocks earlier is subtracted, so P covers the newest L
// samples. This is the same window as the later half of the auto-correlation window, which is how
// the document defines P(d). The recursion is the document's (it draws the power path as a copy of
// the correlator path with no lag); widths are this design's choice.
//
// Interface: one sample per clock on x; p is unsigned and has one register of latency, aligned with
// the r output of autocorr for the same L. Reset clears the delay line and the sum.
module power_calc
  import sync_pkg::*;
#(
  parameter int unsigned L    = 16,
  parameter int unsigned IN_W = SAMPLE_W,
  parameter int unsigned P_W  = 2*IN_W + $clog2(L)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic signed [IN_W-1:0] x_re,
  input  logic signed [IN_W-1:0] x_im,
  output logic        [P_W-1:0]  p
);
  localparam int unsigned E_W = 2*IN_W;

  logic [E_W-1:0] e_now;
  logic [E_W-1:0] edl [L];

  always_comb e_now = $unsigned(E_W'(x_re) * E_W'(x_re)) + $unsigned(E_W'(x_im) * E_W'(x_im));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < L; k++) edl[k] <= '0;
      p <= '0;
    end else begin
      edl[0] <= e_now;
      for (int k = 1; k < L; k++) edl[k] <= edl[k-1];
      p <= p + P_W'(e_now) - P_W'(edl[L-1]);
    end
  end
endmodule
