// tb_ref_pkg: reference models for the multiplier testbenches, written
// independently of the RTL. Rounding is done by searching all powers of two
// for the nearest one (ties to the larger), not by a leading-one rule.
package tb_ref_pkg;

  // Nearest power of two to m (0 for m = 0); ties go to the larger one.
  function automatic longint ref_round(longint m, int n);
    longint best;
    longint bd;
    best = 0;
    if (m == 0) return 0;
    bd = -1;
    for (int e = 0; e <= n; e++) begin
      longint pw, d;
      pw = longint'(1) << e;
      d  = (m > pw) ? m - pw : pw - m;
      if (bd < 0 || d <= bd) begin
        bd   = d;
        best = pw;
      end
    end
    return best;
  endfunction

  function automatic longint ref_exp(longint m, int n);
    longint r;
    r = ref_round(m, n);
    for (int e = 0; e <= n; e++)
      if ((longint'(1) << e) == r) return e;
    return 0;
  endfunction

  // Signed value of an n-bit word.
  function automatic longint sval(longint w, int n, bit signed_mode);
    w = w & ((longint'(1) << n) - 1);
    if (signed_mode && w[n-1]) return w - (longint'(1) << n);
    return w;
  endfunction

  // RoBA product of two signed integers: A*B - (A - Ar)(B - Br), sign apart.
  function automatic longint ref_roba(longint a, longint b, int n);
    longint ma, mb, ra, rb, r;
    ma = (a < 0) ? -a : a;
    mb = (b < 0) ? -b : b;
    ra = ref_round(ma, n);
    rb = ref_round(mb, n);
    r  = ra * mb + rb * ma - ra * rb;
    return ((a < 0) != (b < 0)) ? -r : r;
  endfunction

  // Signed rounding error a - sign(a) * round(|a|).
  function automatic longint ref_err(longint a, int n);
    longint ma;
    ma = (a < 0) ? -a : a;
    return (a < 0) ? -(ma - ref_round(ma, n)) : (ma - ref_round(ma, n));
  endfunction

endpackage
