// tb_fp_pkg: helpers for checking single precision results against real
// arithmetic in the testbenches.
package tb_fp_pkg;
  function automatic real f2r(logic [31:0] f);
    real m;
    int e;
    if (f[30:23] == 0) return 0.0;
    m = 1.0 + real'(f[22:0]) / 8388608.0;
    e = int'(f[30:23]) - 127;
    while (e > 0) begin m = m * 2.0; e--; end
    while (e < 0) begin m = m / 2.0; e++; end
    return f[31] ? -m : m;
  endfunction
  // nearest single precision value of r (normal range only)
  function automatic logic [31:0] r2f(real r);
    real m;
    int e;
    logic s;
    if (r == 0.0) return 32'd0;
    s = r < 0.0;
    m = s ? -r : r;
    e = 0;
    while (m >= 2.0) begin m = m / 2.0; e++; end
    while (m < 1.0)  begin m = m * 2.0; e--; end
    return {s, 8'(e + 127), 23'(longint'((m - 1.0) * 8388608.0 + 0.5))};
  endfunction
  // random normal number with exponent in [emin, emax] (unbiased)
  function automatic logic [31:0] rand_f(int emin, int emax);
    logic [7:0] e;
    e = 8'(127 + emin + int'($urandom_range(emax - emin)));
    return {1'($urandom), e, 23'($urandom)};
  endfunction
  // |got - exp| within tol units of 2^-23 relative to |exp|
  function automatic bit close(logic [31:0] got, real expv, real tol_ulp);
    real g, err, lim;
    g = f2r(got);
    err = g - expv;
    if (err < 0) err = -err;
    lim = (expv < 0 ? -expv : expv) * tol_ulp * (1.0 / 8388608.0);
    return err <= lim;
  endfunction
endpackage
