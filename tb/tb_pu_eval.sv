// tb_pu_eval: checks the cubic evaluation at t = k/8 against floating point
// for random coefficients: the Q.2 result must be the value rounded to a
// quarter (ties may go either way) or the saturation limit.
module tb_pu_eval;
  import spline_pkg::*;

  logic signed [SAMPLE_W-1:0] a;
  logic signed [COEF_W-1:0]   b, c, d;
  logic [T_W-1:0]             t;
  logic signed [OUT_W-1:0]    y;
  int checks = 0, failures = 0;

  pu_eval dut (.a, .b, .c, .d, .t, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real rt, ref_v, q, exp_q;
    for (int n = 0; n < 4000; n++) begin
      a = SAMPLE_W'($urandom);
      b = COEF_W'($signed($urandom_range(0, 120000)) - 60000);
      c = COEF_W'($signed($urandom_range(0, 240000)) - 120000);
      d = COEF_W'($signed($urandom_range(0, 240000)) - 120000);
      t = T_W'(n % 8);
      #1;
      rt = real'(t) / 8.0;
      ref_v = real'(a) + real'(b) / 256.0 * rt + real'(c) / 256.0 * rt * rt
              + real'(d) / 256.0 * rt * rt * rt;
      exp_q = ref_v * 4.0;
      if (exp_q > 2047.0) exp_q = 2047.0;
      if (exp_q < -2048.0) exp_q = -2048.0;
      q = real'(y);
      checks++;
      if (q - exp_q > 0.5 || exp_q - q > 0.5) begin
        failures++;
        $display("eval mismatch t=%0d hw %f ref %f", t, q, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
