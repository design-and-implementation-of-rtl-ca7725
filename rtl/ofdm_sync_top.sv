// ofdm_sync_top: IEEE 802.11a preamble synchronizer (packet detection, frequency offset, timing).
//
// One complex baseband sample enters per clock (20 MHz). Four paths share it:
//   * packet_detector  - lag-16 auto-correlation R16 and window power P16, the shift-based
//                        comparator |R16|^2 > P16^2/2 and the 8-of-32 averager; output pd.
//   * autocorr (L=64)  - lag-64 auto-correlation for the fine frequency estimate.
//   * freq_offset_estimator - CORDIC angle of R16 (coarse) or R64 (fine), chosen by fo_sel,
//                        converted to Hz (f_off) with a ready pulse every 21/20 clocks.
//   * dropoff_detector - coarse timing: samples from pd until the comparator decision drops
//                        (t_off_coarse, t_coarse_valid).
//   * qxcorr + max_detector - fine timing: 64-tap quantized cross-correlation with the long
//                        training symbol; the arg-max over the 100 samples after the coarse
//                        estimate is t_off_fine.
// This is the final configuration chosen in the document (basic auto-correlation coarse timing,
// quantized cross-correlator with maximum detector for fine timing). The gain control that
// precedes the synchronizer is outside the design: its completion enters as agc_done, which
// enables detection, the frequency estimator and the cross-correlator. The cross-correlation
// coefficients are loaded through coef_we/coef_addr/coef_data before use.
//
// Timing: t_off_coarse counts samples from the first clock in which pd is seen by the dropoff
// detector. The max detector is started by the dropoff detector's done pulse; t_off_fine is the
// offset, in samples, from that clock to the clock in which the largest |Lambda|^2 is presented,
// which is 2 clocks after the last sample of the matching 64-sample window entered.
module ofdm_sync_top
  import sync_pkg::*;
#(
  parameter int unsigned XC_TAPS    = 64,
  parameter int unsigned XC_WINDOW  = 100,
  parameter int unsigned AVG_N      = 32,
  parameter int unsigned AVG_M      = 8,
  parameter int unsigned TH_SHIFT   = 1,
  parameter int unsigned COARSE_W   = 8,
  parameter int unsigned HOLD       = 16
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              agc_done,
  input  sample_t                           x,
  input  fo_sel_e                           fo_sel,
  input  logic                              coef_we,
  input  logic [$clog2(XC_TAPS)-1:0]        coef_addr,
  input  qcoef_t                            coef_data,
  output logic                              pd,
  output logic signed [FREQ_W-1:0]          f_off,
  output logic                              f_off_ready,
  output logic [COARSE_W-1:0]               t_off_coarse,
  output logic                              t_coarse_valid,
  output logic [$clog2(XC_WINDOW)-1:0]      t_off_fine,
  output logic                              t_fine_valid
);
  localparam int unsigned ACC16_W = 2*SAMPLE_W + 1 + 4;
  localparam int unsigned ACC64_W = 2*SAMPLE_W + 1 + 6;
  localparam int unsigned P16_W   = 2*SAMPLE_W + 4;
  localparam int unsigned XC_W    = SAMPLE_W + 5 + $clog2(XC_TAPS);
  localparam int unsigned XM_W    = 2*XC_W;

  logic signed [ACC16_W-1:0] r16_re, r16_im;
  logic signed [ACC64_W-1:0] r64_re, r64_im;
  logic        [P16_W-1:0]   p16;
  logic                      metric;
  logic                      coarse_done, fine_done;
  logic signed [XC_W-1:0]    lam_re, lam_im;
  logic        [XM_W-1:0]    lam_mag;

  packet_detector #(
    .L(16), .TH_SHIFT(TH_SHIFT), .AVG_N(AVG_N), .AVG_M(AVG_M), .ACC_W(ACC16_W), .P_W(P16_W)
  ) u_pd (
    .clk, .rst_n, .agc_done, .x, .r16_re, .r16_im, .p16, .metric, .pd
  );

  autocorr #(.L(64), .IN_W(SAMPLE_W), .ACC_W(ACC64_W)) u_r64 (
    .clk, .rst_n, .x_re(x.re), .x_im(x.im), .r_re(r64_re), .r_im(r64_im)
  );

  freq_offset_estimator #(.ACC16_W(ACC16_W), .ACC64_W(ACC64_W)) u_foe (
    .clk, .rst_n, .en(agc_done), .sel(fo_sel),
    .r16_re, .r16_im, .r64_re, .r64_im, .f_off, .ready(f_off_ready)
  );

  dropoff_detector #(.CNT_W(COARSE_W), .HOLD(HOLD)) u_drop (
    .clk, .rst_n, .pd, .metric, .t_off(t_off_coarse), .t_valid(t_coarse_valid), .done(coarse_done)
  );

  qxcorr #(.TAPS(XC_TAPS), .IN_W(SAMPLE_W), .OUT_W(XC_W), .MAG_W(XM_W)) u_xc (
    .clk, .rst_n, .en(agc_done), .x_re(x.re), .x_im(x.im),
    .coef_we, .coef_addr, .coef_data, .lam_re, .lam_im, .mag_sq(lam_mag)
  );

  max_detector #(.WINDOW(XC_WINDOW), .MAG_W(XM_W)) u_max (
    .clk, .rst_n, .start(coarse_done), .mag(lam_mag),
    .t_off(t_off_fine), .t_valid(t_fine_valid), .done(fine_done)
  );
endmodule
