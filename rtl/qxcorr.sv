// qxcorr: quantized cross-correlator against the long training symbol.
//
// It computes Lambda(d) = sum_{m=0}^{TAPS-1} q*(m) * r(d+m), where every real and imaginary part
// of the stored coefficient q*(m) is 0 or +/-2^l with l in 0..3, so each complex product is made of
// four shifted and sign-selected copies of the input and no multiplier. The structure is the
// transposed form the document draws for one tap: Sum(m) = q*(m) * r(d) + z^-1 Sum(m-1), repeated
// TAPS = 64 times, so the newest input meets every coefficient in the same clock and the last
// partial sum is the full correlation. The squared magnitude |Lambda|^2 is formed for the maximum
// detector, which only needs an order-preserving magnitude. The coefficients are a small register
// file written through coef_we/coef_addr/coef_data, so they can be reprogrammed, as the document
// requires; the coefficient encoding and the squared-magnitude output are this design's choices.
//
// Interface: one sample per clock on x while en is high (the chain holds while en is low).
// lam_re/lam_im after the clock edge that took x[n] hold the correlation of the window
// x[n-TAPS+1 .. n], with q*(0) applied to the oldest sample; mag_sq follows one clock later.
// Coefficients reset to zero.
module qxcorr
  import sync_pkg::*;
#(
  parameter int unsigned TAPS  = 64,
  parameter int unsigned IN_W  = SAMPLE_W,
  parameter int unsigned OUT_W = IN_W + 5 + $clog2(TAPS),
  parameter int unsigned MAG_W = 2*OUT_W
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        en,
  input  logic signed [IN_W-1:0]      x_re,
  input  logic signed [IN_W-1:0]      x_im,
  input  logic                        coef_we,
  input  logic [$clog2(TAPS)-1:0]     coef_addr,
  input  qcoef_t                      coef_data,
  output logic signed [OUT_W-1:0]     lam_re,
  output logic signed [OUT_W-1:0]     lam_im,
  output logic        [MAG_W-1:0]     mag_sq
);
  qcoef_t coef [TAPS];
  logic signed [OUT_W-1:0] acc_re [TAPS];
  logic signed [OUT_W-1:0] acc_im [TAPS];

  // value * level, where level is 0 or +/-2^shift
  function automatic logic signed [OUT_W-1:0] qmul(input qlevel_t q, input logic signed [IN_W-1:0] v);
    logic signed [OUT_W-1:0] s;
    s = OUT_W'(v) <<< q.shift;
    if (q.zero) return '0;
    return q.neg ? -s : s;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int m = 0; m < TAPS; m++) coef[m] <= '0;
    end else if (coef_we) begin
      coef[coef_addr] <= coef_data;
    end
  end

  // (a + jb)(xr + j xi) = (a xr - b xi) + j(a xi + b xr)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int m = 0; m < TAPS; m++) begin
        acc_re[m] <= '0;
        acc_im[m] <= '0;
      end
    end else if (en) begin
      acc_re[0] <= qmul(coef[0].re, x_re) - qmul(coef[0].im, x_im);
      acc_im[0] <= qmul(coef[0].re, x_im) + qmul(coef[0].im, x_re);
      for (int m = 1; m < TAPS; m++) begin
        acc_re[m] <= acc_re[m-1] + qmul(coef[m].re, x_re) - qmul(coef[m].im, x_im);
        acc_im[m] <= acc_im[m-1] + qmul(coef[m].re, x_im) + qmul(coef[m].im, x_re);
      end
    end
  end

  assign lam_re = acc_re[TAPS-1];
  assign lam_im = acc_im[TAPS-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) mag_sq <= '0;
    else        mag_sq <= $unsigned(MAG_W'(lam_re) * MAG_W'(lam_re)) + $unsigned(MAG_W'(lam_im) * MAG_W'(lam_im));
  end
endmodule
