// interp_pipeline: the three processing-unit stages of the interpolator.
//   stage 1  two pu_deriv instances solve eq. 3 for D_i and D_{i+1} of the
//            window's middle segment; y_i and y_{i+1} are taken along
//   stage 2  pu_coef forms a, b, c, d (eq. 4)
//   stage 3  pu_eval evaluates the cubic at the operation's t (eq. 1)
// Each stage ends in a register, so one operation (window + t) enters per
// cycle and its interpolated sample leaves three cycles later (res_* valid in
// the third cycle after op_valid). Every operation carries an op_tag_t that
// is delayed with it. A stage's data registers load only when a valid
// operation enters it, which is the clock-enable form of the document's
// gated PU clock: with no operation in flight nothing toggles. The stage
// split follows the document's figure; the registers between the stages are
// this design's choice.
module interp_pipeline
  import spline_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic signed [SAMPLE_W-1:0]  win [WIN],   // y_{i-2} .. y_{i+3}
  input  logic                        op_valid,
  input  op_tag_t                     op_tag,
  output logic                        res_valid,
  output logic signed [OUT_W-1:0]     res_y,       // Q.OUT_FRAC
  output op_tag_t                     res_tag,
  output logic                        busy         // an operation is in flight
);

  // Stage 1
  logic signed [COEF_W-1:0]   d0_c, d1_c;
  logic signed [COEF_W-1:0]   s1_d0, s1_d1;
  logic signed [SAMPLE_W-1:0] s1_y0, s1_y1;
  op_tag_t                    s1_tag;
  logic                       s1_v;

  pu_deriv #(.UPPER(1'b0)) u_pu_di  (.win(win), .d(d0_c));
  pu_deriv #(.UPPER(1'b1)) u_pu_di1 (.win(win), .d(d1_c));

  always_ff @(posedge clk) begin
    if (op_valid) begin
      s1_d0  <= d0_c;
      s1_d1  <= d1_c;
      s1_y0  <= win[2];
      s1_y1  <= win[3];
      s1_tag <= op_tag;
    end
  end

  // Stage 2
  logic signed [SAMPLE_W-1:0] a_c;
  logic signed [COEF_W-1:0]   b_c, c_c, dd_c;
  logic signed [SAMPLE_W-1:0] s2_a;
  logic signed [COEF_W-1:0]   s2_b, s2_c, s2_d;
  op_tag_t                    s2_tag;
  logic                       s2_v;

  pu_coef u_pu_coef (
    .y0(s1_y0), .y1(s1_y1), .d0(s1_d0), .d1(s1_d1),
    .a(a_c), .b(b_c), .c(c_c), .d(dd_c)
  );

  always_ff @(posedge clk) begin
    if (s1_v) begin
      s2_a   <= a_c;
      s2_b   <= b_c;
      s2_c   <= c_c;
      s2_d   <= dd_c;
      s2_tag <= s1_tag;
    end
  end

  // Stage 3
  logic signed [OUT_W-1:0] y_c;

  pu_eval u_pu_eval (
    .a(s2_a), .b(s2_b), .c(s2_c), .d(s2_d), .t(s2_tag.t), .y(y_c)
  );

  always_ff @(posedge clk) begin
    if (s2_v) begin
      res_y   <= y_c;
      res_tag <= s2_tag;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v      <= 1'b0;
      s2_v      <= 1'b0;
      res_valid <= 1'b0;
    end else begin
      s1_v      <= op_valid;
      s2_v      <= s1_v;
      res_valid <= s2_v;
    end
  end

  assign busy = op_valid | s1_v | s2_v | res_valid;

endmodule
