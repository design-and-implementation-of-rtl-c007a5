// tb_interp_pipeline: presents a random window and a random t every cycle
// (with idle gaps) and checks that exactly three cycles later the pipeline
// returns the natural-spline value of the window's middle segment at t,
// within 0.3 sample units of a floating-point reference, with its tag.
module tb_interp_pipeline;
  import spline_pkg::*;
  import tb_spline_ref_pkg::*;

  logic clk = 0, rst_n = 0, op_valid = 0, res_valid, busy;
  logic signed [SAMPLE_W-1:0] win [WIN];
  op_tag_t op_tag, res_tag;
  logic signed [OUT_W-1:0] res_y;
  int checks = 0, failures = 0;

  typedef struct { real v; op_tag_t tag; int cyc; } exp_t;
  exp_t exp_q [$];
  int cyc = 0;

  interp_pipeline dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Monitor: compare results in order, with the expected latency.
  always @(posedge clk) begin
    if (rst_n && res_valid) begin
      exp_t e;
      checks += 3;
      if (exp_q.size() == 0) begin
        failures++; $display("unexpected result");
      end else begin
        e = exp_q.pop_front();
        if (absr(real'(res_y) / 4.0 - e.v) > 0.3) begin
          failures++; $display("value %f expected %f", real'(res_y) / 4.0, e.v);
        end
        if (res_tag != e.tag) begin failures++; $display("tag mismatch"); end
        if (cyc - e.cyc != 3) begin failures++; $display("latency %0d", cyc - e.cyc); end
      end
    end
  end

  initial begin
    win_t w;
    for (int k = 0; k < WIN; k++) win[k] = '0;
    op_tag = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      op_valid = ($urandom % 4) != 0;
      for (int k = 0; k < WIN; k++) begin
        win[k] = SAMPLE_W'($urandom);
        if (n % 10 == 0) win[k] = (k % 2 != 0) ? 8'sd127 : -8'sd128;
        w[k] = real'(win[k]);
      end
      op_tag = op_tag_t'($urandom);
      if (op_valid) begin
        exp_t e;
        e.v = mid_value(w, real'(op_tag.t) / 8.0);
        e.tag = op_tag;
        e.cyc = cyc;
        exp_q.push_back(e);
      end
    end
    @(negedge clk);
    op_valid = 0;
    repeat (5) @(negedge clk);
    checks += 2;
    if (exp_q.size() != 0) begin failures++; $display("missing results"); end
    if (busy) begin failures++; $display("busy while empty"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
