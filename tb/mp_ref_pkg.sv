// mp_ref_pkg: real-valued reference model of the memory polynomial, used by
// the testbenches to work out expected outputs independently of the RTL.
//
//   y(n) = sum_{m=0}^{TAPS-1} sum_{p=1}^{ORDER} c_{m,p} x(n-m) |x(n-m)|^(p-1)
//
// Samples are Q1.15 integers, coefficients Q4.12 integers; results are in
// Q1.15 units (not rounded, not saturated).
package mp_ref_pkg;
  import dpd_pkg::*;

  // Real and imaginary parts of x * |x|^(p-1), in Q1.15 units.
  function automatic void basis(input cplx_t x, input int p, output real re, output real im);
    real xi, xq, r, g;
    xi = real'(x.i) / 32768.0;
    xq = real'(x.q) / 32768.0;
    r  = $sqrt(xi * xi + xq * xq);
    if (r > 32767.0 / 32768.0) r = 32767.0 / 32768.0;
    g  = 1.0;
    for (int k = 1; k < p; k++) g = g * r;
    re = xi * g * 32768.0;
    im = xq * g * 32768.0;
  endfunction

  // One output sample from the history hist[m] = x(n-m).
  function automatic void mp_out(input cplx_t hist [MP_TAPS], input cplx_t coef [NUM_COEF],
                                 output real re, output real im);
    real br, bi, cr, ci;
    re = 0.0;
    im = 0.0;
    for (int m = 0; m < MP_TAPS; m++) begin
      for (int p = 1; p <= MP_ORDER; p++) begin
        basis(hist[m], p, br, bi);
        cr = real'(coef[coef_index(m, p)].i) / 4096.0;
        ci = real'(coef[coef_index(m, p)].q) / 4096.0;
        re += br * cr - bi * ci;
        im += br * ci + bi * cr;
      end
    end
  endfunction

  // One output sample of a memory polynomial of any order and depth:
  // hist[m] = x(n-m), coef[m*order + p-1] = c_{m,p}.
  function automatic void mp_out_gen(input cplx_t hist [], input cplx_t coef [],
                                     input int order, input int taps,
                                     output real re, output real im);
    real br, bi, cr, ci;
    re = 0.0;
    im = 0.0;
    for (int m = 0; m < taps; m++) begin
      for (int p = 1; p <= order; p++) begin
        basis(hist[m], p, br, bi);
        cr = real'(coef[m*order + p-1].i) / 4096.0;
        ci = real'(coef[m*order + p-1].q) / 4096.0;
        re += br * cr - bi * ci;
        im += br * ci + bi * cr;
      end
    end
  endfunction

  // Saturate a real value to the Q1.15 range.
  function automatic real sat(real v);
    if (v > 32767.0) return 32767.0;
    if (v < -32768.0) return -32768.0;
    return v;
  endfunction

  function automatic real absr(real v);
    return (v < 0.0) ? -v : v;
  endfunction

endpackage
