// cubic_spline_interp: on-line cubic spline interpolation, re-alignment and
// down-sampling of detected neural spikes.
//
// Spikes recorded at a low sampling rate are up-sampled by U = 2, 4 or 8 with
// a cubic spline so that they can be aligned with sub-sample precision, then
// kept only at every D-th up-sampled point (D = 1, 2, 4 or 8) for feature
// extraction. The spline is computed window by window: a six-sample window of
// original samples y_{i-2}..y_{i+3} is fitted with a natural spline and only
// its middle segment y_i..y_{i+1} is used. Only the work needed is done:
// nothing runs while no spike is queued, and each spike is handled in two
// steps, a dense interpolation of the two segments around the detector's
// alignment point to find the new alignment point, then interpolation of
// only those samples that survive down-sampling.
//
// Blocks: spike_queue (32 x 45 x 8-bit queue of detected spikes), interp_fsm
// (two-step controller), window_fifo (six-sample window), interp_pipeline
// (PUs for D_i and D_{i+1}, for a,b,c,d and for a+bt+ct^2+dt^3),
// decision_unit (peak / slope / threshold alignment).
//
// Input: one original sample per in_valid & in_ready beat; in_last ends a
// spike and carries in_align (its original alignment index, e.g. the
// detection point) and in_channel. Configuration (cfg_*) is taken when a
// spike starts. Output: the spike's kept samples in time order, 12-bit with 2
// fractional bits, one per out_valid; out_first / out_last bracket a spike,
// out_align marks the sample at the new alignment point, out_channel names
// the channel. There is no output back-pressure: samples leave at up to one
// per cycle. Throughput: the worst case (45 samples, U = 8, D = 1) costs 381
// cycles per spike, about 2,600 spikes/s at 1 MHz. pu_clk_en is the enable
// a clock gate for the processing units would use; inside, the pipeline
// registers load only on valid operations.
// The structure follows the document; the port protocol and number formats
// are this design's choices (see each block).
module cubic_spline_interp
  import spline_pkg::*;
#(
  parameter int N_SPIKES = 32,
  parameter int MAX_LEN  = 45,
  parameter int CH_W     = 7,
  localparam int LEN_W   = $clog2(MAX_LEN + 1)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // from the spike detection unit
  input  logic                       in_valid,
  output logic                       in_ready,
  input  logic signed [SAMPLE_W-1:0] in_sample,
  input  logic                       in_last,
  input  logic [LEN_W-1:0]           in_align,
  input  logic [CH_W-1:0]            in_channel,
  output logic                       in_dropped,
  // user configuration
  input  logic [1:0]                 cfg_up_log,
  input  logic [1:0]                 cfg_dn_log,
  input  align_mode_e                cfg_align_mode,
  input  logic [SAMPLE_W-1:0]        cfg_threshold,
  // to feature extraction
  output logic                       out_valid,
  output logic signed [OUT_W-1:0]    out_sample,
  output logic                       out_first,
  output logic                       out_last,
  output logic                       out_align,
  output logic [CH_W-1:0]            out_channel,
  // status
  output logic                       queue_empty,
  output logic                       pu_clk_en
);

  logic                       q_empty, rd_en, pop;
  logic [LEN_W-1:0]           hd_len, hd_align, rd_idx;
  logic [CH_W-1:0]            hd_channel;
  logic signed [SAMPLE_W-1:0] rd_data;

  logic                       dec_start, dec_done;
  logic [POS_W-1:0]           dec_default_pos, dec_pos;

  logic                       win_shift, op_valid, fsm_busy, pipe_busy;
  op_tag_t                    op_tag, res_tag;
  logic signed [SAMPLE_W-1:0] win [WIN];
  logic                       res_valid;
  logic signed [OUT_W-1:0]    res_y;

  spike_queue #(.N_SPIKES(N_SPIKES), .MAX_LEN(MAX_LEN), .CH_W(CH_W)) u_queue (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_sample, .in_last, .in_align, .in_channel,
    .dropped(in_dropped),
    .empty(q_empty), .hd_len, .hd_align, .hd_channel,
    .rd_en, .rd_idx, .rd_data, .pop
  );

  interp_fsm #(.MAX_LEN(MAX_LEN)) u_fsm (
    .clk, .rst_n,
    .cfg_up_log, .cfg_dn_log,
    .q_empty, .hd_len, .hd_align, .rd_en, .rd_idx, .pop,
    .dec_start, .dec_default_pos, .dec_done, .dec_pos,
    .win_shift, .op_valid, .op_tag, .busy(fsm_busy)
  );

  window_fifo u_window (
    .clk, .rst_n, .shift(win_shift), .din(rd_data), .win
  );

  interp_pipeline u_pipe (
    .clk, .rst_n, .win, .op_valid, .op_tag,
    .res_valid, .res_y, .res_tag, .busy(pipe_busy)
  );

  decision_unit u_decision (
    .clk, .rst_n,
    .start(dec_start), .mode(cfg_align_mode), .threshold(cfg_threshold),
    .default_pos(dec_default_pos),
    .in_valid(res_valid & res_tag.step1), .in_y(res_y), .in_pos(res_tag.pos),
    .in_last(res_tag.step_last),
    .done(dec_done), .pos(dec_pos)
  );

  // Channel of the spike being output: taken at spike start, shown from its
  // first output sample until the next spike's first output sample.
  logic [CH_W-1:0] ch_start, ch_hold;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ch_start <= '0;
      ch_hold  <= '0;
    end else begin
      if (dec_start) ch_start <= hd_channel;
      if (out_valid && out_first) ch_hold <= ch_start;
    end
  end

  assign out_valid   = res_valid & ~res_tag.step1;
  assign out_sample  = res_y;
  assign out_first   = res_tag.first;
  assign out_last    = res_tag.step_last;
  assign out_align   = res_tag.align;
  assign out_channel = (out_valid && out_first) ? ch_start : ch_hold;
  assign queue_empty = q_empty;
  assign pu_clk_en   = fsm_busy | pipe_busy;

endmodule
