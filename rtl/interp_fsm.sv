// interp_fsm: event-triggered, two-step controller of the interpolator.
//
// While the spike queue is empty the FSM waits in IDLE and issues nothing, so
// the PU pipeline is idle (its clock enable, 'busy', is low). For each queued
// spike of length L with original alignment index A (clamped to 1..L-2) it
// runs two steps; positions are counted in eighths of an original sample
// period, so position p lies in segment p>>3 at t = (p mod 8)/8.
//   Step 1  load the window of segment A-1 (six SRAM reads), then evaluate
//           every up-sampled point of segments A-1 and A, i.e. positions
//           8(A-1), 8(A-1)+8/U, ..., 8(A+1)-8/U. The decision unit picks the
//           new alignment point P among them.
//   Step 2  load the window of segment 0, wait for P, then walk the segments
//           0..L-2 and evaluate only the positions kept after down-sampling:
//           P mod S, P mod S + S, ... below 8(L-1), with S = 8/U*D.
// One operation (SRAM read and/or evaluation) is issued per cycle. Moving to
// the next segment costs one SRAM read, issued in the same cycle as the
// segment's last evaluation, so a segment takes max(1, evaluations) cycles.
// The step-2 window load overlaps the pipeline latency of step 1. A spike with
// L = 45, U = 8, D = 1 takes 1 + 6 + 16 + 6 + 352 = 381 cycles.
// U = 2^up_log and D = 2^dn_log are latched when a spike starts.
//
// Interfaces: queue read (rd_en/rd_idx now, data next cycle); win_shift and
// op_valid/op_tag are registered so that they meet the SRAM data: the window
// shifts and the operation enters the pipeline in the cycle after issue, and
// an operation sees every read issued at least one cycle before it.
// Samples outside the spike (window indices below 0 or above L-1) are
// replaced by the nearest end sample.
// The two steps, the six-cycle window load, the t generation and the on-line
// decision follow the document; cycle-level details, the clamping of the
// window at the spike ends and the start/end of step 2 are this design's
// choices.
module interp_fsm
  import spline_pkg::*;
#(
  parameter int MAX_LEN = 45,
  localparam int LEN_W  = $clog2(MAX_LEN + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // configuration
  input  logic [1:0]           cfg_up_log,    // U = 2^cfg_up_log
  input  logic [1:0]           cfg_dn_log,    // D = 2^cfg_dn_log
  // spike queue
  input  logic                 q_empty,
  input  logic [LEN_W-1:0]     hd_len,
  input  logic [LEN_W-1:0]     hd_align,
  output logic                 rd_en,
  output logic [LEN_W-1:0]     rd_idx,
  output logic                 pop,
  // decision unit
  output logic                 dec_start,
  output logic [POS_W-1:0]     dec_default_pos,
  input  logic                 dec_done,
  input  logic [POS_W-1:0]     dec_pos,
  // window and PU pipeline (registered)
  output logic                 win_shift,
  output logic                 op_valid,
  output op_tag_t              op_tag,
  output logic                 busy
);

  localparam int PW = POS_W + 1;

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_RUN, S_WAIT} state_e;

  state_e            state, state_n;
  logic              step1, step1_n;
  logic [LEN_W-1:0]  len_q, len_n;
  logic [LEN_W-1:0]  seg, seg_n;
  logic [2:0]        ld_cnt, ld_cnt_n;
  logic [1:0]        up_q, up_n, dn_q, dn_n;
  logic [PW-1:0]     pnext, pnext_n, pend, pend_n, stride, stride_n;
  logic [POS_W-1:0]  align_p, align_p_n;
  logic              first_pend, first_pend_n;

  logic              rd_en_c, op_valid_c;
  logic [LEN_W-1:0]  rd_idx_c;
  op_tag_t           op_tag_c;

  // Nearest index inside the spike 0..l-1.
  function automatic logic [LEN_W-1:0] clampi(input int x, input int l);
    if (x < 0)      return '0;
    if (x > l - 1)  return LEN_W'(l - 1);
    return LEN_W'(x);
  endfunction

  int a_clamp;    // original alignment index of the head spike, in 1..L-2
  always_comb begin
    a_clamp = int'(hd_align);
    if (a_clamp < 1) a_clamp = 1;
    if (a_clamp > int'(hd_len) - 2) a_clamp = int'(hd_len) - 2;
  end

  always_comb begin
    logic [PW-1:0] pn2, seg_hi, s2;
    logic          has_eval, seg_end, step_done;

    state_n      = state;
    step1_n      = step1;
    len_n        = len_q;
    seg_n        = seg;
    ld_cnt_n     = ld_cnt;
    up_n         = up_q;
    dn_n         = dn_q;
    pnext_n      = pnext;
    pend_n       = pend;
    stride_n     = stride;
    align_p_n    = align_p;
    first_pend_n = first_pend;

    rd_en_c    = 1'b0;
    rd_idx_c   = '0;
    op_valid_c = 1'b0;
    op_tag_c   = '0;
    pop        = 1'b0;
    dec_start  = 1'b0;
    dec_default_pos = POS_W'(8 * a_clamp);

    pn2       = pnext;
    seg_hi    = PW'((int'(seg) + 1) * 8);
    has_eval  = 1'b0;
    seg_end   = 1'b0;
    step_done = 1'b0;
    s2        = PW'(1) << (3 - int'(up_q) + int'(dn_q));

    unique case (state)
      S_IDLE: begin
        if (!q_empty) begin
          dec_start = 1'b1;
          len_n     = hd_len;
          up_n      = cfg_up_log;
          dn_n      = cfg_dn_log;
          step1_n   = 1'b1;
          seg_n     = LEN_W'(a_clamp - 1);
          pnext_n   = PW'(8 * (a_clamp - 1));
          pend_n    = PW'(8 * (a_clamp + 1));
          stride_n  = PW'(8) >> cfg_up_log;
          ld_cnt_n  = '0;
          state_n   = S_LOAD;
        end
      end

      S_LOAD: begin
        rd_en_c  = 1'b1;
        rd_idx_c = clampi(int'(seg) - 2 + int'(ld_cnt), int'(len_q));
        ld_cnt_n = ld_cnt + 1'b1;
        if (ld_cnt == 3'd5) begin
          if (step1)         state_n = S_RUN;
          else if (dec_done) state_n = S_RUN;
          else               state_n = S_WAIT;
          if (!step1 && dec_done) begin
            align_p_n    = dec_pos;
            pnext_n      = PW'(dec_pos) & (s2 - 1'b1);
            first_pend_n = 1'b1;
          end
        end
      end

      S_WAIT: begin
        if (dec_done) begin
          align_p_n    = dec_pos;
          pnext_n      = PW'(dec_pos) & (s2 - 1'b1);
          first_pend_n = 1'b1;
          state_n      = S_RUN;
        end
      end

      S_RUN: begin
        has_eval = (pnext < pend) && (pnext < seg_hi);
        if (has_eval) begin
          pn2              = pnext + stride;
          op_valid_c       = 1'b1;
          op_tag_c.t       = pnext[T_W-1:0];
          op_tag_c.pos     = pnext[POS_W-1:0];
          op_tag_c.step1   = step1;
          op_tag_c.step_last = (pn2 >= pend);
          op_tag_c.first   = !step1 && first_pend;
          op_tag_c.align   = !step1 && (pnext[POS_W-1:0] == align_p);
          if (!step1) first_pend_n = 1'b0;
          pnext_n          = pn2;
          seg_end          = (pn2 >= seg_hi);
        end else begin
          seg_end          = 1'b1;
        end
        step_done = (pn2 >= pend);
        if (seg_end && !step_done) begin
          rd_en_c  = 1'b1;
          rd_idx_c = clampi(int'(seg) + 4, int'(len_q));
          seg_n    = seg + 1'b1;
        end
        if (step_done) begin
          if (step1) begin
            step1_n  = 1'b0;
            seg_n    = '0;
            ld_cnt_n = '0;
            pend_n   = PW'(8 * (int'(len_q) - 1));
            stride_n = s2;
            state_n  = S_LOAD;
          end else begin
            pop      = 1'b1;
            state_n  = S_IDLE;
          end
        end
      end

      default: state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      step1      <= 1'b0;
      len_q      <= '0;
      seg        <= '0;
      ld_cnt     <= '0;
      up_q       <= '0;
      dn_q       <= '0;
      pnext      <= '0;
      pend       <= '0;
      stride     <= '0;
      align_p    <= '0;
      first_pend <= 1'b0;
      win_shift  <= 1'b0;
      op_valid   <= 1'b0;
      op_tag     <= '0;
    end else begin
      state      <= state_n;
      step1      <= step1_n;
      len_q      <= len_n;
      seg        <= seg_n;
      ld_cnt     <= ld_cnt_n;
      up_q       <= up_n;
      dn_q       <= dn_n;
      pnext      <= pnext_n;
      pend       <= pend_n;
      stride     <= stride_n;
      align_p    <= align_p_n;
      first_pend <= first_pend_n;
      win_shift  <= rd_en_c;
      op_valid   <= op_valid_c;
      op_tag     <= op_tag_c;
    end
  end

  assign rd_en  = rd_en_c;
  assign rd_idx = rd_idx_c;
  assign busy   = (state != S_IDLE);

endmodule
