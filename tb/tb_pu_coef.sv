// tb_pu_coef: checks the polynomial coefficients against eq. 4 computed in
// floating point for random samples and derivatives, and that the cubic
// ends at y_{i+1}: a + b + c + d = y_{i+1}.
module tb_pu_coef;
  import spline_pkg::*;

  logic signed [SAMPLE_W-1:0] y0, y1, a;
  logic signed [COEF_W-1:0]   d0, d1, b, c, d;
  int checks = 0, failures = 0;

  pu_coef dut (.y0, .y1, .d0, .d1, .a, .b, .c, .d);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ry0, ry1, rd0, rd1, rc, rd;
    for (int n = 0; n < 2000; n++) begin
      y0 = SAMPLE_W'($urandom);
      y1 = SAMPLE_W'($urandom);
      d0 = COEF_W'($signed($urandom_range(0, 2 * 63000)) - 63000);
      d1 = COEF_W'($signed($urandom_range(0, 2 * 63000)) - 63000);
      #1;
      ry0 = real'(y0); ry1 = real'(y1);
      rd0 = real'(d0) / 256.0; rd1 = real'(d1) / 256.0;
      rc = 3.0 * (ry1 - ry0) - 2.0 * rd0 - rd1;
      rd = 2.0 * (ry0 - ry1) + rd0 + rd1;
      checks += 5;
      if ((real'(a) + real'(b) / 256.0 + real'(c) / 256.0 + real'(d) / 256.0) != ry1) begin
        failures++; $display("segment does not end at y_{i+1}");
      end
      if (a != y0) begin failures++; $display("a mismatch"); end
      if (b != d0) begin failures++; $display("b mismatch"); end
      if (real'(c) / 256.0 != rc) begin failures++; $display("c mismatch %f %f", real'(c)/256.0, rc); end
      if (real'(d) / 256.0 != rd) begin failures++; $display("d mismatch %f %f", real'(d)/256.0, rd); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
