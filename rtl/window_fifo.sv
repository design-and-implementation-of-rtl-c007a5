// window_fifo: the six pipelined FIFO registers that hold the window of
// original samples y_{i-2} .. y_{i+3} for the window-based interpolation.
// On 'shift' the newest sample from the spike queue enters at the y_{i+3}
// end and every register moves one place towards y_{i-2}; the oldest sample
// is dropped. Moving the window by one sample moves the interpolated
// (middle) segment by one segment. The registers reset to zero (reset value
// is this design's choice). The window length of six follows the document.
module window_fifo
  import spline_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        shift,
  input  logic signed [SAMPLE_W-1:0]  din,          // next y_{i+3}
  output logic signed [SAMPLE_W-1:0]  win [WIN]     // win[0] = y_{i-2} .. win[5] = y_{i+3}
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < WIN; k++) win[k] <= '0;
    end else if (shift) begin
      for (int k = 0; k < WIN - 1; k++) win[k] <= win[k+1];
      win[WIN-1] <= din;
    end
  end

endmodule
