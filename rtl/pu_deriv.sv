// pu_deriv: first-stage processing unit, first derivative of the spline at one
// end of the middle segment of a six-sample window.
//
// The natural cubic spline through the window w[0..5] = y_{i-2}..y_{i+3}
// needs the first derivatives D that solve the tridiagonal system
//   [2 1 0 0 0 0; 1 4 1 0 0 0; ...; 0 0 0 0 1 2] D = 3*(differences of y)
// (eq. 3 of the spline algorithm, natural end conditions). The window length
// is fixed, so the inverse matrix is a constant and each D is a fixed linear
// combination of the six samples. This unit computes that combination with
// constant weights rounded to CF = 12 fractional bits (see spline_pkg) and
// rounds the result to D_FRAC = 8 fractional bits.
//   UPPER = 0: D_i     (derivative at y_i,     window index 2)
//   UPPER = 1: D_{i+1} (derivative at y_{i+1}, window index 3)
// The two PUs of the document's architecture are two instances of this module.
// Purely combinational; the pipeline register follows in interp_pipeline.
// Solving eq. 3 by a precomputed constant inverse is this design's choice.
module pu_deriv
  import spline_pkg::*;
#(
  parameter bit UPPER = 1'b0
) (
  input  logic signed [SAMPLE_W-1:0] win [WIN],   // y_{i-2} .. y_{i+3}
  output logic signed [COEF_W-1:0]   d            // Q.D_FRAC
);

  localparam int ACC_W = SAMPLE_W + CF + 4;

  logic signed [ACC_W-1:0] acc;

  always_comb begin
    acc = '0;
    for (int k = 0; k < WIN; k++) begin
      // D_{i+1} is D_i of the mirrored window, negated.
      logic signed [ACC_W-1:0] wgt;
      wgt = ACC_W'(UPPER ? -d_weight(WIN - 1 - k) : d_weight(k));
      acc += wgt * ACC_W'(win[k]);
    end
    d = COEF_W'((acc + ACC_W'(1 << (CF - D_FRAC - 1))) >>> (CF - D_FRAC));
  end

endmodule
