// bs_ref_pkg: reference models of both solvers for the system testbenches.
//
// Each routine advances one option's grid by one time step in real arithmetic,
// rounding to the hardware's format after every operation in the order the
// hardware uses, so that results can be compared bit for bit. Values are held in
// 64-bit words; with dbl = 0 they are binary32 patterns in the low half, with
// dbl = 1 binary64 patterns.
//   stencil_step - explicit step u_k' = (a_k u_{k-1} + b_k u_k) + c_k u_{k+1},
//                  end points held fixed;
//   thomas_step  - implicit step, Thomas algorithm with the reciprocal
//                  r = 1/(b_i - a_i c*_{i-1}) and d = u of the previous step.
// The coefficient functions give the Black-Scholes coefficients of the explicit
// and the implicit scheme for volatility sig, interest rate rr, time step dt and
// price index k (price step factored out).
package bs_ref_pkg;
  import fp_ref_pkg::*;

  typedef logic [63:0] word_t;

  function automatic word_t fmul(input word_t x, input word_t y, input bit dbl);
    return from_real(to_real(x, dbl) * to_real(y, dbl), dbl);
  endfunction
  function automatic word_t fadd(input word_t x, input word_t y, input bit dbl);
    return from_real(to_real(x, dbl) + to_real(y, dbl), dbl);
  endfunction
  function automatic word_t fsub(input word_t x, input word_t y, input bit dbl);
    return from_real(to_real(x, dbl) - to_real(y, dbl), dbl);
  endfunction

  task automatic stencil_step(input word_t a[], input word_t b[], input word_t c[],
                              inout word_t u[], input bit dbl);
    word_t nu[];
    int k_n;
    k_n = u.size();
    nu = new[k_n];
    nu[0] = u[0];
    nu[k_n-1] = u[k_n-1];
    for (int k = 1; k < k_n - 1; k++)
      nu[k] = fadd(fadd(fmul(a[k], u[k-1], dbl), fmul(b[k], u[k], dbl), dbl),
                   fmul(c[k], u[k+1], dbl), dbl);
    u = nu;
  endtask

  task automatic thomas_step(input word_t a[], input word_t b[], input word_t c[],
                             inout word_t u[], input bit dbl);
    word_t cs[], ds[];
    word_t r, den, num;
    int k_n;
    k_n = u.size();
    cs = new[k_n];
    ds = new[k_n];
    for (int i = 0; i < k_n; i++) begin
      if (i == 0) begin
        den = b[0];
        num = u[0];
      end else begin
        den = fsub(b[i], fmul(a[i], cs[i-1], dbl), dbl);
        num = fsub(u[i], fmul(a[i], ds[i-1], dbl), dbl);
      end
      r = from_real(1.0 / to_real(den, dbl), dbl);
      cs[i] = fmul(r, c[i], dbl);
      ds[i] = fmul(r, num, dbl);
    end
    u[k_n-1] = ds[k_n-1];
    for (int i = k_n - 2; i >= 0; i--) u[i] = fsub(ds[i], fmul(cs[i], u[i+1], dbl), dbl);
  endtask

  // Explicit scheme: a = s^2 k^2 dt/2 - r k dt/2, b = 1 - s^2 k^2 dt - r dt,
  // c = s^2 k^2 dt/2 + r k dt/2
  function automatic word_t expl_a(real sig, real rr, real dt, int k, bit dbl);
    return from_real(0.5 * sig * sig * k * k * dt - 0.5 * rr * k * dt, dbl);
  endfunction
  function automatic word_t expl_b(real sig, real rr, real dt, int k, bit dbl);
    return from_real(1.0 - sig * sig * k * k * dt - rr * dt, dbl);
  endfunction
  function automatic word_t expl_c(real sig, real rr, real dt, int k, bit dbl);
    return from_real(0.5 * sig * sig * k * k * dt + 0.5 * rr * k * dt, dbl);
  endfunction
  // Implicit scheme: the same terms with opposite sign, b = 1 + s^2 k^2 dt + r dt
  function automatic word_t impl_a(real sig, real rr, real dt, int k, bit dbl);
    return from_real(-0.5 * sig * sig * k * k * dt + 0.5 * rr * k * dt, dbl);
  endfunction
  function automatic word_t impl_b(real sig, real rr, real dt, int k, bit dbl);
    return from_real(1.0 + sig * sig * k * k * dt + rr * dt, dbl);
  endfunction
  function automatic word_t impl_c(real sig, real rr, real dt, int k, bit dbl);
    return from_real(-0.5 * sig * sig * k * k * dt - 0.5 * rr * k * dt, dbl);
  endfunction
  // Call payoff on the price grid: max(k - strike, 0)
  function automatic word_t payoff(int k, int strike, bit dbl);
    return from_real((k > strike) ? real'(k - strike) : 0.0, dbl);
  endfunction

endpackage
