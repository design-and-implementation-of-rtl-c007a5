// pu_eval: last-stage processing unit, evaluates Y(t) = a + b t + c t^2 + d t^3
// (eq. 1) at t = k/8, k = 0..7.
// Horner form ((d t + c) t + b) t + a is computed exactly: each multiply by
// t = k/8 is a multiply by the 3-bit k and three more fractional bits. The
// result is rounded to OUT_FRAC = 2 fractional bits and saturated to OUT_W
// bits. Inputs: a integer sample, b/c/d in Q.D_FRAC. Purely combinational;
// the output register follows in interp_pipeline. The Horner form and the
// output format are this design's choices.
module pu_eval
  import spline_pkg::*;
(
  input  logic signed [SAMPLE_W-1:0] a,
  input  logic signed [COEF_W-1:0]   b,
  input  logic signed [COEF_W-1:0]   c,
  input  logic signed [COEF_W-1:0]   d,
  input  logic        [T_W-1:0]      t,      // t = k/8
  output logic signed [OUT_W-1:0]    y       // Q.OUT_FRAC
);

  localparam int H_W   = 40;
  localparam int SHIFT = D_FRAC + 3 * T_W - OUT_FRAC;   // Q.17 -> Q.2
  localparam logic signed [H_W-1:0] YMAX = H_W'((1 <<< (OUT_W - 1)) - 1);
  localparam logic signed [H_W-1:0] YMIN = -H_W'(1 <<< (OUT_W - 1));

  logic signed [H_W-1:0] tk, h1, h2, h3, r;

  always_comb begin
    tk = H_W'({1'b0, t});
    h1 = H_W'(d) * tk + (H_W'(c) <<< T_W);                       // Q.(D_FRAC+3)
    h2 = h1 * tk + (H_W'(b) <<< (2 * T_W));                      // Q.(D_FRAC+6)
    h3 = h2 * tk + (H_W'(a) <<< (D_FRAC + 3 * T_W));             // Q.(D_FRAC+9)
    r  = (h3 + H_W'(1 <<< (SHIFT - 1))) >>> SHIFT;
    if (r > YMAX)      y = YMAX[OUT_W-1:0];
    else if (r < YMIN) y = YMIN[OUT_W-1:0];
    else               y = r[OUT_W-1:0];
  end

endmodule
