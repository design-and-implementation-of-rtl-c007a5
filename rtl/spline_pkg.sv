// spline_pkg: types and constants shared by the cubic spline interpolation engine.
//
// Number formats (all two's complement):
//   original sample     SAMPLE_W = 8 bits, integer
//   derivative D_i      Q.D_FRAC  (8 fractional bits), COEF_W = 20 bits
//   coefficients b,c,d  Q.D_FRAC, COEF_W bits; a = y_i is the sample itself
//   interpolated sample OUT_W = 12 bits with OUT_FRAC = 2 fractional bits
//   t                   T_W = 3 bits, t = k/8, k = 0..7
//   position            POS_W = 9 bits, in 1/8 of an original sample period
//                       (position p lies in segment p>>3 at t = p[2:0]/8)
//
// The 8-bit sample, the 45-sample spike and the 32-spike queue follow the
// document; the internal word lengths and the 2-bit fraction of the output
// are this design's choice.
package spline_pkg;

  localparam int SAMPLE_W = 8;
  localparam int D_FRAC   = 8;
  localparam int COEF_W   = 20;
  localparam int OUT_W    = 12;
  localparam int OUT_FRAC = 2;
  localparam int T_W      = 3;
  localparam int POS_W    = 9;
  localparam int CF       = 12;   // fractional bits of the eq. 3 solver weights
  localparam int WIN      = 6;    // window of original samples

  // Alignment criteria selectable by the user.
  typedef enum logic [1:0] {
    ALIGN_PEAK   = 2'd0,   // largest |y|
    ALIGN_SLOPE  = 2'd1,   // largest |y[k]-y[k-1]|
    ALIGN_THRESH = 2'd2    // first |y| >= threshold
  } align_mode_e;

  // Tag carried with each interpolation operation through the PU pipeline.
  typedef struct packed {
    logic [T_W-1:0]   t;          // t in eighths
    logic [POS_W-1:0] pos;        // position in eighths from sample 0
    logic             step1;      // 1: alignment refinement (step 1)
    logic             step_last;  // last operation of the step
    logic             first;      // first output sample of the spike
    logic             align;      // output sample at the new alignment point
  } op_tag_t;

  // Inverse of the 6x6 natural-spline matrix of eq. 3 times its right-hand
  // side gives D_3 (= D_i, window index 2) as sum_k W[k]*w[k] / 209 with
  // W = {26, -156, -3, 168, -42, 7} on the window y_{i-2}..y_{i+3}.
  // D_{i+1} uses the same weights mirrored and negated.
  function automatic int d_num(input int k);
    case (k)
      0: return 26;
      1: return -156;
      2: return -3;
      3: return 168;
      4: return -42;
      default: return 7;
    endcase
  endfunction

  // Weight k rounded to CF fractional bits: round(d_num(k) * 2^CF / 209).
  function automatic int d_weight(input int k);
    int n;
    n = d_num(k) * (1 << CF) * 2;
    if (n >= 0) return (n + 209) / 418;
    else        return (n - 209) / 418;
  endfunction

endpackage
