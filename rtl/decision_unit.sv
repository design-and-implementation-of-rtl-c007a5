// decision_unit: finds the refined alignment point of a spike on-line from
// the step-1 interpolated samples (the two segments around the original
// alignment point, at the up-sampled rate).
// 'start' clears it for a new spike and sets the fallback position; then each
// in_valid sample (value in_y, position in_pos) is examined as it leaves the
// PU pipeline, and in_last marks the last one. One cycle after in_last,
// 'done' is high and 'pos' holds the new alignment point; both stay until the
// next 'start'. Criteria (mode):
//   ALIGN_PEAK    the sample with the largest |y|
//   ALIGN_SLOPE   the sample ending the largest |y[k] - y[k-1]| step
//   ALIGN_THRESH  the first sample with |y| >= threshold (threshold in
//                 integer sample units, the spike detection threshold);
//                 the fallback position if none crosses it
// Ties keep the earliest sample. The three criteria follow the document; the
// use of magnitudes (so both spike polarities work), the tie rule and the
// fallback are this design's choices.
module decision_unit
  import spline_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  align_mode_e                 mode,
  input  logic [SAMPLE_W-1:0]         threshold,
  input  logic [POS_W-1:0]            default_pos,
  input  logic                        in_valid,
  input  logic signed [OUT_W-1:0]     in_y,        // Q.OUT_FRAC
  input  logic [POS_W-1:0]            in_pos,
  input  logic                        in_last,
  output logic                        done,
  output logic [POS_W-1:0]            pos
);

  logic [OUT_W:0]           best_val, abs_y, slope, thr_q;
  logic signed [OUT_W-1:0]  prev_y;
  logic                     have_best, have_prev;
  logic                     upd;
  logic [OUT_W:0]           cand;
  align_mode_e              mode_q;
  logic [SAMPLE_W-1:0]      thr_reg;

  function automatic logic [OUT_W:0] mag(input logic signed [OUT_W:0] v);
    return v[OUT_W] ? -v : v;
  endfunction

  always_comb begin
    abs_y = mag({in_y[OUT_W-1], in_y});
    slope = mag({in_y[OUT_W-1], in_y} - {prev_y[OUT_W-1], prev_y});
    thr_q = (OUT_W+1)'(thr_reg) << OUT_FRAC;
    upd   = 1'b0;
    cand  = abs_y;
    unique case (mode_q)
      ALIGN_SLOPE: begin
        cand = slope;
        upd  = have_prev && (!have_best || slope > best_val);
      end
      ALIGN_THRESH: upd = !have_best && (abs_y >= thr_q);
      default:      upd = !have_best || abs_y > best_val;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done      <= 1'b0;
      have_best <= 1'b0;
      have_prev <= 1'b0;
      best_val  <= '0;
      pos       <= '0;
      prev_y    <= '0;
      mode_q    <= ALIGN_PEAK;
      thr_reg   <= '0;
    end else if (start) begin
      done      <= 1'b0;
      have_best <= 1'b0;
      have_prev <= 1'b0;
      pos       <= default_pos;
      mode_q    <= mode;
      thr_reg   <= threshold;
    end else if (in_valid && !done) begin
      prev_y    <= in_y;
      have_prev <= 1'b1;
      if (upd) begin
        have_best <= 1'b1;
        best_val  <= cand;
        pos       <= in_pos;
      end
      if (in_last) done <= 1'b1;
    end
  end

endmodule
