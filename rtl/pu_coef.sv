// pu_coef: second-stage processing unit, polynomial coefficients of the
// middle segment (eq. 4 of the spline algorithm):
//   a = y_i
//   b = D_i
//   c = 3(y_{i+1} - y_i) - 2 D_i - D_{i+1}
//   d = 2(y_i - y_{i+1}) +   D_i + D_{i+1}
// The sign of the difference in d is the one that makes the segment end at
// y_{i+1}, Y(1) = a + b + c + d = y_{i+1}, as the continuity condition of the
// spline requires.
// Inputs y_i, y_{i+1} are integer samples, D_i, D_{i+1} and the outputs
// b, c, d are Q.D_FRAC fixed point (exact: only shifts and adds). Purely
// combinational; the pipeline register follows in interp_pipeline.
module pu_coef
  import spline_pkg::*;
(
  input  logic signed [SAMPLE_W-1:0] y0,     // y_i
  input  logic signed [SAMPLE_W-1:0] y1,     // y_{i+1}
  input  logic signed [COEF_W-1:0]   d0,     // D_i
  input  logic signed [COEF_W-1:0]   d1,     // D_{i+1}
  output logic signed [SAMPLE_W-1:0] a,
  output logic signed [COEF_W-1:0]   b,
  output logic signed [COEF_W-1:0]   c,
  output logic signed [COEF_W-1:0]   d
);

  logic signed [COEF_W-1:0] dy;   // (y_{i+1} - y_i) in Q.D_FRAC

  always_comb begin
    dy = (COEF_W'(y1) - COEF_W'(y0)) <<< D_FRAC;
    a  = y0;
    b  = d0;
    c  = 3 * dy - 2 * d0 - d1;
    d  = -2 * dy + d0 + d1;
  end

endmodule
