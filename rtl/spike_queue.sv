// spike_queue: the queue SRAM for original spikes.
// Detected spikes of all channels are queued here in arrival order until the
// interpolator takes them. Storage is N_SPIKES slots of MAX_LEN samples of
// SAMPLE_W bits (32 x 45 x 8 = 11,520 bits by default), one slot per spike,
// sample k of slot s at word s*MAX_LEN + k. Beside the sample array each slot
// keeps a small tag: the spike's length, its original alignment index and its
// channel number.
//
// Write side (from the spike detection unit): one sample per cycle with
// in_valid & in_ready; in_last marks the last sample of a spike and carries
// in_align (index of the original alignment point) and in_channel. Samples
// beyond MAX_LEN are dropped. A spike becomes visible only when its last
// sample arrives; one shorter than MIN_LEN = 3 samples is discarded
// (pulse on 'dropped'). in_ready is low while all slots hold spikes.
// Read side (to the FSM): 'empty' and the head spike's tag; rd_en/rd_idx
// read sample rd_idx of the head spike, rd_data is valid the next cycle
// (synchronous SRAM read); 'pop' frees the head slot.
// Queue depth, spike length and sample width follow the document; the tag
// fields, the separate write and read ports and the write protocol are this
// design's choices.
module spike_queue
  import spline_pkg::*;
#(
  parameter int N_SPIKES = 32,
  parameter int MAX_LEN  = 45,
  parameter int CH_W     = 7,
  localparam int LEN_W   = $clog2(MAX_LEN + 1),
  localparam int SLOT_W  = (N_SPIKES > 1) ? $clog2(N_SPIKES) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // write side
  input  logic                       in_valid,
  output logic                       in_ready,
  input  logic signed [SAMPLE_W-1:0] in_sample,
  input  logic                       in_last,
  input  logic [LEN_W-1:0]           in_align,
  input  logic [CH_W-1:0]            in_channel,
  output logic                       dropped,
  // read side
  output logic                       empty,
  output logic [LEN_W-1:0]           hd_len,
  output logic [LEN_W-1:0]           hd_align,
  output logic [CH_W-1:0]            hd_channel,
  input  logic                       rd_en,
  input  logic [LEN_W-1:0]           rd_idx,
  output logic signed [SAMPLE_W-1:0] rd_data,
  input  logic                       pop
);

  localparam int DEPTH  = N_SPIKES * MAX_LEN;
  localparam int ADDR_W = $clog2(DEPTH);
  localparam int MIN_LEN = 3;

  logic signed [SAMPLE_W-1:0] mem [DEPTH];
  logic [LEN_W-1:0]           tag_len   [N_SPIKES];
  logic [LEN_W-1:0]           tag_align [N_SPIKES];
  logic [CH_W-1:0]            tag_ch    [N_SPIKES];

  logic [SLOT_W-1:0] head, tail;
  logic [SLOT_W:0]   count;
  logic [LEN_W-1:0]  widx;

  logic wr_fire, commit, do_pop;
  logic [LEN_W-1:0] new_len;

  assign in_ready = (count < (SLOT_W+1)'(N_SPIKES));
  assign empty    = (count == '0);
  assign wr_fire  = in_valid & in_ready;
  assign new_len  = (widx < LEN_W'(MAX_LEN)) ? widx + 1'b1 : widx;
  assign commit   = wr_fire & in_last & (new_len >= LEN_W'(MIN_LEN));
  assign dropped  = wr_fire & in_last & (new_len <  LEN_W'(MIN_LEN));
  assign do_pop   = pop & ~empty;

  function automatic logic [SLOT_W-1:0] next_slot(input logic [SLOT_W-1:0] s);
    return (s == SLOT_W'(N_SPIKES - 1)) ? '0 : s + 1'b1;
  endfunction

  // Sample array: one write port, one synchronous read port.
  always_ff @(posedge clk) begin
    if (wr_fire && widx < LEN_W'(MAX_LEN))
      mem[ADDR_W'(tail) * ADDR_W'(MAX_LEN) + ADDR_W'(widx)] <= in_sample;
    if (rd_en)
      rd_data <= mem[ADDR_W'(head) * ADDR_W'(MAX_LEN) + ADDR_W'(rd_idx)];
  end

  always_ff @(posedge clk) begin
    if (commit) begin
      tag_len[tail]   <= new_len;
      tag_align[tail] <= in_align;
      tag_ch[tail]    <= in_channel;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head  <= '0;
      tail  <= '0;
      count <= '0;
      widx  <= '0;
    end else begin
      if (wr_fire) widx <= in_last ? '0 : new_len;
      if (commit)  tail <= next_slot(tail);
      if (do_pop)  head <= next_slot(head);
      count <= count + (SLOT_W+1)'(commit) - (SLOT_W+1)'(do_pop);
    end
  end

  assign hd_len     = tag_len[head];
  assign hd_align   = tag_align[head];
  assign hd_channel = tag_ch[head];

`ifndef SYNTHESIS
  a_no_pop_when_empty: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty);
  a_read_in_spike:     assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> (rd_idx < hd_len));
`endif

endmodule
