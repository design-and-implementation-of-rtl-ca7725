// autocorr: sliding-window delayed auto-correlation R(d) = sum_{m=0}^{L-1} conj(r[d+m]) * r[d+m+L].
//
// Every clock one complex sample x enters. The block forms the lag-L product
// p[n] = conj(x[n-L]) * x[n] and keeps the window sum with the recursive update
// R[n] = R[n-1] + p[n] - p[n-L], so only one complex multiplier and two delay lines (L samples,
// L products) are needed whatever L is. With L = 16 it is the short-training-sequence correlator of
// the packet detector; with L = 64 it is the long-training-sequence correlator used for the fine
// frequency offset estimate. The recursion and the two lengths follow the document; keeping the
// complex value (not only the real part) is needed because the frequency estimator takes its angle.
//
// Interface: x is the current sample; r_re/r_im are the window sum whose newest sample is the x
// presented on the previous clock (one register of latency). Reset clears both delay lines and the
// sum, so the recursion is exact: integer wrap-around never leaves a residue.
module autocorr
  import sync_pkg::*;
#(
  parameter int unsigned L     = 16,
  parameter int unsigned IN_W  = SAMPLE_W,
  parameter int unsigned ACC_W = 2*IN_W + 1 + $clog2(L)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [IN_W-1:0]  x_re,
  input  logic signed [IN_W-1:0]  x_im,
  output logic signed [ACC_W-1:0] r_re,
  output logic signed [ACC_W-1:0] r_im
);
  localparam int unsigned P_W = 2*IN_W + 1;

  logic signed [IN_W-1:0] dly_re [L];
  logic signed [IN_W-1:0] dly_im [L];
  logic signed [P_W-1:0]  pdl_re [L];
  logic signed [P_W-1:0]  pdl_im [L];
  logic signed [P_W-1:0]  p_re, p_im;

  // conj(a) * b with a = x[n-L], b = x[n]
  always_comb begin
    p_re = P_W'(dly_re[L-1]) * P_W'(x_re) + P_W'(dly_im[L-1]) * P_W'(x_im);
    p_im = P_W'(dly_re[L-1]) * P_W'(x_im) - P_W'(dly_im[L-1]) * P_W'(x_re);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < L; k++) begin
        dly_re[k] <= '0;
        dly_im[k] <= '0;
        pdl_re[k] <= '0;
        pdl_im[k] <= '0;
      end
      r_re <= '0;
      r_im <= '0;
    end else begin
      dly_re[0] <= x_re;
      dly_im[0] <= x_im;
      pdl_re[0] <= p_re;
      pdl_im[0] <= p_im;
      for (int k = 1; k < L; k++) begin
        dly_re[k] <= dly_re[k-1];
        dly_im[k] <= dly_im[k-1];
        pdl_re[k] <= pdl_re[k-1];
        pdl_im[k] <= pdl_im[k-1];
      end
      r_re <= r_re + ACC_W'(p_re) - ACC_W'(pdl_re[L-1]);
      r_im <= r_im + ACC_W'(p_im) - ACC_W'(pdl_im[L-1]);
    end
  end
endmodule
