// sync_pkg: types and constants shared by the IEEE 802.11a preamble synchronizer.
//
// The synchronizer processes one complex baseband sample per clock (20 MHz sample rate, 50 ns
// period). Samples are signed two's-complement I/Q pairs of SAMPLE_W bits each; the sample width
// is this design's choice, the document leaves the fixed-point format open.
//
// Angles are binary angles: ANGLE_W bits span one full turn, so 2**ANGLE_W equals 2*pi and the
// value wraps naturally at +/-pi. The CORDIC arctangent table holds
// ATAN_LUT[i] = round(atan(2**-i) / (2*pi) * 2**24) for i = 0 .. 19.
package sync_pkg;

  localparam int unsigned SAMPLE_W = 12;   // bits per I or Q component (assumed)
  localparam int unsigned ANGLE_W  = 24;   // binary-angle width, one turn = 2**24
  localparam int unsigned FREQ_W   = 32;   // signed frequency estimate in Hz
  localparam int unsigned SAMPLE_RATE_HZ = 20_000_000; // 50 ns sample period

  typedef struct packed {
    logic signed [SAMPLE_W-1:0] re;
    logic signed [SAMPLE_W-1:0] im;
  } sample_t;

  // One component (real or imaginary) of a quantized cross-correlation coefficient.
  // Its value is 0 when zero is set, otherwise (neg ? -1 : +1) * 2**shift, which gives the
  // nine levels -8, -4, -2, -1, 0, 1, 2, 4, 8.
  typedef struct packed {
    logic       zero;
    logic       neg;
    logic [1:0] shift;
  } qlevel_t;

  // A complex quantized coefficient q*(m) (already conjugated).
  typedef struct packed {
    qlevel_t re;
    qlevel_t im;
  } qcoef_t;

  // Selects which auto-correlation feeds the frequency offset estimator.
  typedef enum logic {
    FO_COARSE_16 = 1'b0,   // 16-sample auto-correlation over the short training sequence
    FO_FINE_64   = 1'b1    // 64-sample auto-correlation over the long training sequence
  } fo_sel_e;

  localparam int unsigned CORDIC_ITERS = 20;
  localparam logic [ANGLE_W-1:0] ATAN_LUT [CORDIC_ITERS] = '{
    24'd2097152, 24'd1238021, 24'd654136, 24'd332050, 24'd166669,
    24'd83416,   24'd41718,   24'd20860,  24'd10430,  24'd5215,
    24'd2608,    24'd1304,    24'd652,    24'd326,    24'd163,
    24'd81,      24'd41,      24'd20,     24'd10,     24'd5
  };

endpackage
