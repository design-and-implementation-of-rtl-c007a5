// tb_window_fifo: shifts a random sample stream into the window and checks
// that the window always holds the six most recent samples in order, and
// that it holds when 'shift' is low.
module tb_window_fifo;
  import spline_pkg::*;

  logic clk = 0, rst_n = 0, shift = 0;
  logic signed [SAMPLE_W-1:0] din, win [WIN];
  logic signed [SAMPLE_W-1:0] hist [$];
  int checks = 0, failures = 0;

  window_fifo dut (.clk, .rst_n, .shift, .din, .win);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = '0;
    for (int k = 0; k < WIN; k++) hist.push_back('0);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      shift = ($urandom % 4) != 0;
      din   = SAMPLE_W'($urandom);
      @(posedge clk);
      if (shift) begin
        hist.push_back(din);
        void'(hist.pop_front());
      end
      #1;
      for (int k = 0; k < WIN; k++) begin
        checks++;
        if (win[k] !== hist[k]) begin
          failures++;
          $display("window[%0d] = %0d, expected %0d", k, win[k], hist[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
