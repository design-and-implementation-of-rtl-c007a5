// tb_pu_deriv: checks both derivative units against a floating-point
// solution of the natural-spline system for random and extreme windows.
// D is Q.8; the allowed error is 0.1 sample units (weight rounding).
module tb_pu_deriv;
  import spline_pkg::*;
  import tb_spline_ref_pkg::*;

  logic signed [SAMPLE_W-1:0] win [WIN];
  logic signed [COEF_W-1:0]   d_lo, d_hi;
  int checks = 0, failures = 0;

  pu_deriv #(.UPPER(1'b0)) dut_lo (.win(win), .d(d_lo));
  pu_deriv #(.UPPER(1'b1)) dut_hi (.win(win), .d(d_hi));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    win_t w, d;
    for (int n = 0; n < 3000; n++) begin
      for (int k = 0; k < WIN; k++) begin
        if (n < 8) win[k] = (((n >> (k % 3)) & 1) != 0) ? 8'sd127 : -8'sd128;
        else       win[k] = SAMPLE_W'($urandom);
        w[k] = real'(win[k]);
      end
      #1;
      solve_d(w, d);
      checks += 2;
      if (absr(real'(d_lo) / 256.0 - d[2]) > 0.1) begin
        failures++;
        $display("D_i mismatch: hw %f ref %f", real'(d_lo) / 256.0, d[2]);
      end
      if (absr(real'(d_hi) / 256.0 - d[3]) > 0.1) begin
        failures++;
        $display("D_i+1 mismatch: hw %f ref %f", real'(d_hi) / 256.0, d[3]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
