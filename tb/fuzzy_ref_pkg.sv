// fuzzy_ref_pkg: reference model of the four input fuzzy processor, used by
// the testbenches. It computes the expected output of one data set directly
// from the stored fuzzy system with plain integer arithmetic: the two
// involved fuzzy sets per input, the trapezoid truth values, the T-norm over
// the inputs present in each rule and the Sugeno weighted mean, rounded down.
package fuzzy_ref_pkg;
  import fuzzy_pkg::*;

  function automatic int ref_alpha(int x, mf_shape_t s);
    int a = int'(s.a), b = int'(s.b), c = int'(s.c), d = int'(s.d);
    if (x < a || x > d) return 0;
    if (x >= b && x <= c) return 15;
    if (x < b) return ((x - a) * 15) / (b - a);
    return ((d - x) * 15) / (d - c);
  endfunction

  // lowest fuzzy set whose support holds x, else the first not yet ended,
  // limited to N_FS-2
  function automatic int ref_lo(int x, mf_support_t sup [N_FS]);
    int lo = -1;
    for (int f = 0; f < N_FS && lo < 0; f++)
      if (x >= int'(sup[f].first) && x <= int'(sup[f].last)) lo = f;
    for (int f = 0; f < N_FS && lo < 0; f++)
      if (x <= int'(sup[f].last)) lo = f;
    if (lo < 0 || lo > N_FS - 2) lo = N_FS - 2;
    return lo;
  endfunction

  function automatic int ref_mul(int p, int q);
    return (p * q) / 15;
  endfunction

  // theta of one rule from four alpha values (missing inputs given as 15)
  function automatic int ref_theta(int al [4], logic [3:0] premise, bit product);
    int a [4];
    if (premise == 4'b0) return 0;
    for (int v = 0; v < 4; v++) a[v] = premise[3-v] ? al[v] : 15;
    if (product) return ref_mul(ref_mul(a[0], a[1]), ref_mul(a[2], a[3]));
    begin
      int m = a[0];
      for (int v = 1; v < 4; v++) if (a[v] < m) m = a[v];
      return m;
    end
  endfunction
endpackage
