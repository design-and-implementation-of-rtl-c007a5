// tb_spline_ref_pkg: floating-point reference model for the testbenches.
// A natural cubic spline through six samples is solved directly with the
// tridiagonal (Thomas) algorithm, and the middle segment is evaluated in
// Hermite form. Nothing here shares code or constants with the RTL.
package tb_spline_ref_pkg;

  typedef real win_t [6];

  // First derivatives D[0..5] of the natural spline through w.
  function automatic void solve_d(input win_t w, output win_t d);
    real diag [6], rhs [6], cp [6];
    for (int k = 0; k < 6; k++) diag[k] = (k == 0 || k == 5) ? 2.0 : 4.0;
    rhs[0] = 3.0 * (w[1] - w[0]);
    for (int k = 1; k < 5; k++) rhs[k] = 3.0 * (w[k+1] - w[k-1]);
    rhs[5] = 3.0 * (w[5] - w[4]);
    // forward sweep (off-diagonals are 1)
    cp[0] = 1.0 / diag[0];
    rhs[0] = rhs[0] / diag[0];
    for (int k = 1; k < 6; k++) begin
      real m;
      m = diag[k] - cp[k-1];
      cp[k] = 1.0 / m;
      rhs[k] = (rhs[k] - rhs[k-1]) / m;
    end
    d[5] = rhs[5];
    for (int k = 4; k >= 0; k--) d[k] = rhs[k] - cp[k] * d[k+1];
  endfunction

  // Value of the spline between w[2] and w[3] at t in [0,1].
  function automatic real mid_value(input win_t w, input real t);
    win_t d;
    real h00, h01, h10, h11;
    solve_d(w, d);
    h00 = 2.0*t*t*t - 3.0*t*t + 1.0;
    h01 = -2.0*t*t*t + 3.0*t*t;
    h10 = t*t*t - 2.0*t*t + t;
    h11 = t*t*t - t*t;
    return h00*w[2] + h01*w[3] + h10*d[2] + h11*d[3];
  endfunction

  function automatic real absr(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

endpackage
