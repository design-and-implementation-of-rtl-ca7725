// freq_offset_estimator: carrier frequency offset from the angle of an auto-correlation value.
//
// A frequency offset df turns each sample by 2*pi*df*Ts more than the previous one, so the lag-L
// auto-correlation R has angle 2*pi*L*Ts*df and df = angle(R) / (2*pi*L*Ts). The input selector
// picks the 16-sample (coarse, +/-625 kHz range) or the 64-sample (fine, +/-156.25 kHz range)
// auto-correlation. The chosen value is scaled to the 20-bit CORDIC input by an arithmetic right
// shift (with saturation), folded into the first quadrant by taking magnitudes, and its angle is
// computed by the 20-iteration CORDIC. The quadrant is then restored from the sign bits of the
// real and imaginary parts, and the hold stage turns the angle into Hz and keeps the settled value
// for the reader. The mux, scaling, CORDIC, quadrant correction and hold stage follow the
// document's block diagram; the shift amounts, binary-angle units and Hz output are this design's
// choices.
//
// Interface: while en is high the estimator restarts on the value present at the start of each
// conversion, one result every 20 clocks. ready pulses for one clock when f_off (signed Hz) is
// updated, 21 clocks after the clock whose input it used (20 CORDIC iterations plus the hold
// register); f_off holds in between. sel is sampled with the input, so a change takes effect at
// the next conversion.
module freq_offset_estimator
  import sync_pkg::*;
#(
  parameter int unsigned ACC16_W  = 2*SAMPLE_W + 1 + 4,
  parameter int unsigned ACC64_W  = 2*SAMPLE_W + 1 + 6,
  parameter int unsigned CORDIC_W = 20,
  parameter int unsigned SHIFT16  = ACC16_W - CORDIC_W,
  parameter int unsigned SHIFT64  = ACC64_W - CORDIC_W
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      en,
  input  fo_sel_e                   sel,
  input  logic signed [ACC16_W-1:0] r16_re,
  input  logic signed [ACC16_W-1:0] r16_im,
  input  logic signed [ACC64_W-1:0] r64_re,
  input  logic signed [ACC64_W-1:0] r64_im,
  output logic signed [FREQ_W-1:0]  f_off,
  output logic                      ready
);
  localparam int unsigned SW = (ACC16_W > ACC64_W) ? ACC16_W : ACC64_W;
  localparam int unsigned PW = ANGLE_W + 24;
  // Hz per turn of the correlation angle for each lag: Fs / L.
  localparam logic signed [PW-1:0] K16 = PW'(SAMPLE_RATE_HZ / 16);
  localparam logic signed [PW-1:0] K64 = PW'(SAMPLE_RATE_HZ / 64);
  localparam logic [ANGLE_W-1:0] HALF_TURN = ANGLE_W'(1) << (ANGLE_W - 1);

  typedef struct packed {
    logic    x_neg;
    logic    y_neg;
    fo_sel_e sel;
  } ctx_t;

  function automatic logic signed [CORDIC_W-1:0] sat_shift(input logic signed [SW-1:0] v,
                                                           input int unsigned sh);
    logic signed [SW-1:0] s;
    s = v >>> sh;
    if (s > SW'(2**(CORDIC_W-1) - 1)) return {1'b0, {(CORDIC_W-1){1'b1}}};
    if (s < -SW'(2**(CORDIC_W-1)))    return {1'b1, {(CORDIC_W-1){1'b0}}};
    return s[CORDIC_W-1:0];
  endfunction

  logic signed [CORDIC_W-1:0] xs, ys;
  logic [CORDIC_W-1:0] xa, ya;
  logic busy, done;
  logic [ANGLE_W-1:0] theta, ang_full;
  logic [CORDIC_W+1:0] mag;
  ctx_t ctx_in, ctx_out;
  logic signed [PW-1:0] prod;

  // Input selector, scaling and folding into the first quadrant.
  always_comb begin
    if (sel == FO_FINE_64) begin
      xs = sat_shift(SW'(r64_re), SHIFT64);
      ys = sat_shift(SW'(r64_im), SHIFT64);
    end else begin
      xs = sat_shift(SW'(r16_re), SHIFT16);
      ys = sat_shift(SW'(r16_im), SHIFT16);
    end
    xa = xs[CORDIC_W-1] ? CORDIC_W'(-xs) : CORDIC_W'(xs);
    ya = ys[CORDIC_W-1] ? CORDIC_W'(-ys) : CORDIC_W'(ys);
    ctx_in = '{x_neg: xs[CORDIC_W-1], y_neg: ys[CORDIC_W-1], sel: sel};
  end

  cordic_vectoring #(.IN_W(CORDIC_W), .ITERS(CORDIC_ITERS), .TAG_W($bits(ctx_t))) u_cordic (
    .clk, .rst_n, .start(en), .x_in(xa), .y_in(ya), .tag_in(ctx_in),
    .busy, .done, .angle(theta), .mag, .tag_out(ctx_out)
  );

  // Quadrant correction of the settled first-quadrant angle, then angle -> Hz.
  always_comb begin
    unique case ({ctx_out.x_neg, ctx_out.y_neg})
      2'b00:   ang_full = theta;               // first quadrant
      2'b10:   ang_full = HALF_TURN - theta;   // second quadrant
      2'b11:   ang_full = theta - HALF_TURN;   // third quadrant
      default: ang_full = -theta;              // fourth quadrant
    endcase
    prod = PW'($signed(ang_full)) * ((ctx_out.sel == FO_FINE_64) ? K64 : K16);
  end

  // Hold stage: f_off = angle/turn * Fs/L, rounded to the nearest Hz.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f_off <= '0;
      ready <= 1'b0;
    end else begin
      ready <= done;
      if (done) f_off <= FREQ_W'((prod + $signed(PW'(HALF_TURN))) >>> ANGLE_W);
    end
  end
endmodule
