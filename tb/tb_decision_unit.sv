// tb_decision_unit: feeds random step-1 sample sequences (with gaps) in each
// alignment mode and checks the chosen position against a model: largest
// magnitude, largest step between neighbours, or first crossing of the
// threshold (fallback position when none crosses). 'done' must rise exactly
// one cycle after the last sample and hold until the next start.
module tb_decision_unit;
  import spline_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, in_valid = 0, in_last = 0, done;
  align_mode_e mode = ALIGN_PEAK;
  logic [SAMPLE_W-1:0] threshold = '0;
  logic [POS_W-1:0] default_pos = '0, in_pos = '0, pos;
  logic signed [OUT_W-1:0] in_y = '0;
  int checks = 0, failures = 0;
  int n_mode [3] = '{0, 0, 0};
  int n_fallback = 0;

  decision_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int iabs(input int v);
    return v < 0 ? -v : v;
  endfunction

  initial begin
    int n, vals [16], poss [16], exp_pos, best, m;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 600; it++) begin
      m = it % 3;
      n = 2 << ($urandom % 3);            // 2U samples, U = 1, 2, 4 or 8
      if (it % 7 == 0) n = 16;
      for (int k = 0; k < n; k++) begin
        vals[k] = $signed($urandom_range(0, 1600)) - 800;
        if (it % 5 == 0) vals[k] = $signed($urandom_range(0, 8)) - 4;   // ties
        poss[k] = 40 + 2 * k;
      end
      @(negedge clk);
      start = 1;
      mode = align_mode_e'(m);
      threshold = SAMPLE_W'($urandom_range(20, 220));
      default_pos = POS_W'($urandom_range(0, 300));
      @(negedge clk);
      start = 0;
      // model
      exp_pos = int'(default_pos);
      best = -1;
      for (int k = 0; k < n; k++) begin
        if (m == 0 && iabs(vals[k]) > best) begin best = iabs(vals[k]); exp_pos = poss[k]; end
        if (m == 1 && k > 0 && iabs(vals[k] - vals[k-1]) > best) begin
          best = iabs(vals[k] - vals[k-1]); exp_pos = poss[k];
        end
        if (m == 2 && best < 0 && iabs(vals[k]) >= 4 * int'(threshold)) begin
          best = 1; exp_pos = poss[k];
        end
      end
      if (m == 2 && best < 0) n_fallback++;
      n_mode[m]++;
      for (int k = 0; k < n; k++) begin
        while ($urandom % 3 == 0) begin
          in_valid = 0;
          @(negedge clk);
        end
        in_valid = 1; in_y = OUT_W'(vals[k]); in_pos = POS_W'(poss[k]); in_last = (k == n - 1);
        checks++;
        if (done) begin failures++; $display("done before the last sample"); end
        @(negedge clk);
      end
      in_valid = 0; in_last = 0;
      checks += 2;
      if (!done) begin failures++; $display("done not set one cycle after the last sample"); end
      if (int'(pos) != exp_pos) begin
        failures++;
        $display("mode %0d: pos %0d expected %0d", m, pos, exp_pos);
      end
      repeat ($urandom_range(0, 3)) @(negedge clk);
      checks++;
      if (!done || int'(pos) != exp_pos) begin failures++; $display("result not held"); end
    end
    checks++;
    if (n_fallback == 0) begin failures++; $display("threshold fallback never exercised"); end
    $display("modes %0d %0d %0d, fallbacks %0d", n_mode[0], n_mode[1], n_mode[2], n_fallback);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
