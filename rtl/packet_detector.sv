// packet_detector: normalized auto-correlation packet detector with M-of-N averaging.
//
// The short training sequence repeats every 16 samples, so a packet shows up as a large lag-16
// auto-correlation R(d) relative to the received power P(d). Instead of dividing to form
// M(d) = |R(d)|^2 / P(d)^2 and comparing with th = 0.5, the comparator tests
// |R(d)|^2 > P(d)^2 * 2^-TH_SHIFT, so the threshold is a shift (th = 0.5 gives TH_SHIFT = 1), as
// the document chooses. The raw decision (metric) drives an M-of-N averaging circuit whose output
// is the packet-detected flag pd. Both are held low until agc_done, because detection must start
// only after gain control has settled; the gain control itself is outside this design.
//
// Interface: one complex sample per clock on x. r16_re/r16_im and p16 (one clock after x) are
// exported because the frequency estimator reuses them. metric follows one clock later, pd one
// clock after metric. Reset clears all state.
module packet_detector
  import sync_pkg::*;
#(
  parameter int unsigned L        = 16,
  parameter int unsigned TH_SHIFT = 1,
  parameter int unsigned AVG_N    = 32,
  parameter int unsigned AVG_M    = 8,
  parameter int unsigned ACC_W    = 2*SAMPLE_W + 1 + $clog2(L),
  parameter int unsigned P_W      = 2*SAMPLE_W + $clog2(L)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    agc_done,
  input  sample_t                 x,
  output logic signed [ACC_W-1:0] r16_re,
  output logic signed [ACC_W-1:0] r16_im,
  output logic        [P_W-1:0]   p16,
  output logic                    metric,
  output logic                    pd
);
  localparam int unsigned MAG_W = 2*ACC_W + TH_SHIFT;

  logic [MAG_W-1:0] r_mag_sq_scaled;
  logic [MAG_W-1:0] p_sq;
  logic             pd_raw;

  autocorr #(.L(L), .IN_W(SAMPLE_W), .ACC_W(ACC_W)) u_r16 (
    .clk, .rst_n, .x_re(x.re), .x_im(x.im), .r_re(r16_re), .r_im(r16_im)
  );

  power_calc #(.L(L), .IN_W(SAMPLE_W), .P_W(P_W)) u_p16 (
    .clk, .rst_n, .x_re(x.re), .x_im(x.im), .p(p16)
  );

  // |R|^2 * 2^TH_SHIFT against P^2: the same as |R|^2 / P^2 > 2^-TH_SHIFT without a divider.
  always_comb begin
    r_mag_sq_scaled = ($unsigned(MAG_W'(r16_re) * MAG_W'(r16_re)) + $unsigned(MAG_W'(r16_im) * MAG_W'(r16_im)))
                      << TH_SHIFT;
    p_sq            = MAG_W'(p16) * MAG_W'(p16);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) metric <= 1'b0;
    else        metric <= agc_done && (r_mag_sq_scaled > p_sq);
  end

  pd_averager #(.N(AVG_N), .M(AVG_M)) u_avg (
    .clk, .rst_n, .in_bit(metric), .pd(pd_raw)
  );

  assign pd = pd_raw && agc_done;
endmodule
