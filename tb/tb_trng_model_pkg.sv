// tb_trng_model_pkg -- reference stochastic model used by the top-level tests.
//
// For PLL clocks whose edges are placed at ideal times plus independent
// Gaussian deviations (the behaviour of pll_model), the probability that the
// clk0 sample m reads clk1 high is
//   p_m = Phi(u/s) - Phi((u - a*T1)/s) + Phi((u - T1)/s) + 1 - Phi((u + (1-a)*T1)/s)
// with u = (m*T0 - phase1) mod T1 the sampling position inside the clk1
// period, a the duty cycle and s = sqrt(s0^2 + s1^2) the combined rms edge
// jitter (previous falling edge, rising edge, falling edge and next rising
// edge of clk1). Over one pattern period of K_D samples the counter value is
// a sum of independent Bernoulli variables (a Poisson binomial law), so
//   E(N) = sum p_m,   Var(N) = sum p_m (1 - p_m),
// and the Allan variance equals Var(N) for independent periods.
// Phi is computed from erf with the Abramowitz-Stegun 7.1.26 formula.
// l_min(beta), the Total failure threshold, is the smallest run length l for
// which the probability of l equal successive values, approximated with the
// normal law as sum_k (Phi((k+0.5-E)/sd) - Phi((k-0.5-E)/sd))^l, is at most
// beta; beta = K_D*T0/t for one false alarm per operating time t.
// V_min, the Online threshold, is the variance at the smallest jitter that
// still gives the entropy target in the worst case. In the worst case both
// clock edges fall half-way between two sampling positions, so the
// contributors sit at (j + 1/2)*Delta from each edge; the raw bit is the
// parity of all samples, Pr(R = 1) = 1/2 + (1/2)*prod_j |2 p_j - 1|, and
//   H_inf = -log2(max(Pr, 1-Pr)),  H_1 = binary entropy of Pr.
// These depend only on sigma/Delta, so V_min is the same for every
// configuration. sigma_min is found by bisection.
package tb_trng_model_pkg;
  timeunit 1ps;
  timeprecision 1fs;

  function automatic real erf_approx(real x);
    real t, y, ax;
    ax = (x < 0.0) ? -x : x;
    t = 1.0 / (1.0 + 0.3275911 * ax);
    y = 1.0 - (((((1.061405429 * t - 1.453152027) * t) + 1.421413741) * t
               - 0.284496736) * t + 0.254829592) * t * $exp(-ax * ax);
    return (x < 0.0) ? -y : y;
  endfunction

  function automatic real phi(real x);
    return 0.5 * (1.0 + erf_approx(x / $sqrt(2.0)));
  endfunction

  // Probability that the sample at position u (ps) of the clk1 period is 1.
  function automatic real p_one(real u, real t1, real duty, real sigma);
    if (sigma <= 0.0) return (u < duty * t1) ? 1.0 : 0.0;
    return phi(u / sigma) - phi((u - duty * t1) / sigma) + phi((u - t1) / sigma)
           + 1.0 - phi((u + (1.0 - duty) * t1) / sigma);
  endfunction

  // Mean and variance of the counter value over one pattern period.
  task automatic counter_moments(input int kd, input real t0, input real t1,
                                 input real phase1, input real duty, input real sigma,
                                 output real mean, output real var_n, output int n_contr);
    real u, p;
    mean = 0.0;
    var_n = 0.0;
    n_contr = 0;
    for (int m = 0; m < kd; m++) begin
      u = real'(m) * t0 - phase1;
      u = u - t1 * $floor(u / t1);
      p = p_one(u, t1, duty, sigma);
      mean += p;
      var_n += p * (1.0 - p);
      if (p >= 0.02275 && p <= 0.97725) n_contr++;
    end
  endtask

  // Worst-case raw-bit entropy and counter variance for jitter sd (in units
  // of Delta). off = 0.5 gives the worst case, off = 0 the best one.
  function automatic void edge_model(input real sd, input real off,
                            output real h_inf, output real h_1, output real var_n);
    real p, bias, pr;
    bias = 0.5;
    var_n = 0.0;
    for (int j = -100; j < 100; j++) begin
      p = phi((real'(j) + off) / sd);
      bias *= (2.0 * p - 1.0) * (2.0 * p - 1.0);   // both edges alike
      var_n += 2.0 * p * (1.0 - p);
    end
    pr = 0.5 + bias;
    h_inf = -$ln(pr) / $ln(2.0);
    h_1 = (pr >= 1.0) ? 0.0 : -(pr * $ln(pr) + (1.0 - pr) * $ln(1.0 - pr)) / $ln(2.0);
  endfunction

  // Variance at the minimal jitter for the target, min-entropy or Shannon.
  function automatic real v_min(real target, bit use_min_entropy);
    real lo, hi, mid, h_inf, h_1, v;
    lo = 0.01;
    hi = 10.0;
    for (int it = 0; it < 60; it++) begin
      mid = 0.5 * (lo + hi);
      edge_model(mid, 0.5, h_inf, h_1, v);
      if ((use_min_entropy ? h_inf : h_1) >= target) hi = mid;
      else lo = mid;
    end
    edge_model(hi, 0.5, h_inf, h_1, v);
    return v;
  endfunction

  function automatic int l_min(real mean, real var_n, real beta, int kd);
    real sd, sum, pk;
    int  l;
    sd = $sqrt(var_n);
    l = 1;
    forever begin
      sum = 0.0;
      for (int k = 1; k <= kd; k++) begin
        pk = phi((real'(k) + 0.5 - mean) / sd) - phi((real'(k) - 0.5 - mean) / sd);
        sum += pk ** real'(l);
      end
      if (sum <= beta) return l;
      l++;
    end
  endfunction
endpackage
