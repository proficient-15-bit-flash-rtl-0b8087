// adc_ref_pkg: reference models used by the testbenches, written in floating
// point and independently of the RTL's fixed-point arithmetic.
//
// ref_inv_gauss(count, n, sigma) is the intended transfer of the
// inverse-Gaussian stage: q = count/n - 1/2 clamped to +-0.45, mapped through
// a piecewise-linear Phi^-1 with knots at |q| = 0, .15, .25, .35, .40, .45
// (Phi^-1 = 0, .385320, .674490, 1.036433, 1.281552, 1.644854), times sigma.
// ones(v, n) counts the ones of an n-bit vector.
package adc_ref_pkg;

  function automatic real ref_inv_gauss(input int count, input int n, input real sigma);
    real qk [6] = '{0.0, 0.15, 0.25, 0.35, 0.40, 0.45};
    real zk [6] = '{0.0, 0.385320, 0.674490, 1.036433, 1.281552, 1.644854};
    real q, a, z;
    q = real'(count) / real'(n) - 0.5;
    a = (q < 0.0) ? -q : q;
    if (a > 0.45) a = 0.45;
    z = zk[5];
    for (int k = 0; k < 5; k++) begin
      if (a >= qk[k] && a <= qk[k+1]) begin
        z = zk[k] + (zk[k+1] - zk[k]) * (a - qk[k]) / (qk[k+1] - qk[k]);
        break;
      end
    end
    return (q < 0.0) ? -sigma * z : sigma * z;
  endfunction

  function automatic int ones(input logic [63:0] v, input int n);
    int c;
    c = 0;
    for (int i = 0; i < n; i++) c += int'(v[i]);
    return c;
  endfunction

endpackage
