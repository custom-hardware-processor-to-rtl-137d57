// fom_ref_pkg: double-precision reference model of the figure of merit,
// shared by the processor testbenches. It repeats the processor's
// arithmetic in real numbers: the angle of point i is formed from single-
// precision inputs as the processor does, the model intensity is the
// background plus an alpha1 and an alpha2 pseudo-Voigt component per peak
// with the exponential taken from the same truncated series, and the
// figure of merit is the Poisson-weighted chi-squared sum.
package fom_ref_pkg;
  import fom_pkg::*;
  import fp_ref_pkg::*;

  function automatic real pv_ref(input real x, input real i0, input real x0,
                                 input real w, input real eta, input int iters);
    real t2, c, term, sum;
    t2 = ((x - x0) / w) ** 2;
    c  = $ln(2.0) * t2;
    term = 1.0; sum = 1.0;
    for (int k = 1; k <= iters; k++) begin
      term = term * c / real'(k);
      sum  = sum + term;
    end
    return i0 * (eta / (1.0 + t2) + (1.0 - eta) / sum);
  endfunction

  // angle of point i, rounded like the processor: x0 + float(i)*dx
  function automatic real x_of(input int i, input float_t x0, input float_t dx);
    return to_real(to_single(to_real(x0) + to_real(to_single(real'(i) * to_real(dx)))));
  endfunction

  function automatic real ycal_ref(input real x, input peak_params_t pk[], input float_t bg0,
                                   input float_t bg1, input int iters);
    real y;
    y = to_real(bg0) + to_real(bg1) * x;
    foreach (pk[j]) begin
      y += pv_ref(x, to_real(pk[j].i0), to_real(pk[j].x01), to_real(pk[j].w),
                  to_real(pk[j].eta), iters);
      y += pv_ref(x, to_real(pk[j].i0) / 2.0, to_real(pk[j].x02), to_real(pk[j].w),
                  to_real(pk[j].eta), iters);
    end
    return y;
  endfunction

  function automatic real chi2_ref(input int n, input int counts[], input float_t x0,
                                   input float_t dx, input peak_params_t pk[],
                                   input float_t bg0, input float_t bg1, input int iters);
    real chi, x, yc;
    chi = 0.0;
    for (int i = 0; i < n; i++) begin
      x   = x_of(i, x0, dx);
      yc  = ycal_ref(x, pk, bg0, bg1, iters);
      chi += (real'(counts[i]) - yc) ** 2 / real'(counts[i]);
    end
    return chi;
  endfunction

  // the benchmark candidate: the parameters the profile was made with
  function automatic void benchmark(output peak_params_t pk[], output float_t bg0,
                                    output float_t bg1);
    pk = new[2];
    pk[0] = '{i0: to_single(1000.0), x01: to_single(30.0), x02: to_single(30.07643),
              w: to_single(0.2), eta: to_single(0.5)};
    pk[1] = '{i0: to_single(500.0), x01: to_single(30.5), x02: to_single(30.57777),
              w: to_single(0.2), eta: to_single(0.5)};
    // b(x) = 100 - 10*(x/25 - 1) = 110 - 0.4*x
    bg0 = to_single(110.0);
    bg1 = to_single(-0.4);
  endfunction

endpackage
