// tb_ref_pkg: reference models used by the testbenches, written apart from
// the RTL. The pair cost is computed from signed wire steps: with
// da, db in {-1, 0, +1} the steps of the two wires, cost = |da| + |db| +
// |da - db|, which gives coupling 1 when one wire moves, 2 when they move in
// opposite directions and 0 when they move together.
package tb_ref_pkg;

  function automatic int ref_step(bit p, bit n);
    return int'(n) - int'(p);
  endfunction

  function automatic int ref_abs(int v);
    return (v < 0) ? -v : v;
  endfunction

  // lo/hi wires of one pair, previous (p) and next (n) values
  function automatic int ref_pair_cost(bit p_lo, bit p_hi, bit n_lo, bit n_hi);
    int da, db;
    da = ref_step(p_lo, n_lo);
    db = ref_step(p_hi, n_hi);
    return ref_abs(da) + ref_abs(db) + ref_abs(da - db);
  endfunction

  // Total switching of a transfer on a w-wire link.
  function automatic int ref_link_cost(bit [63:0] p, bit [63:0] n, int w);
    int c;
    c = 0;
    for (int i = 0; i < w; i++) begin
      c += ref_abs(ref_step(p[i], n[i]));
      if (i + 1 < w) c += ref_abs(ref_step(p[i], n[i]) - ref_step(p[i+1], n[i+1]));
    end
    return c;
  endfunction

  function automatic bit [63:0] odd_mask(int w);
    bit [63:0] m;
    m = '0;
    for (int i = 1; i < w; i += 2) m[i] = 1'b1;
    return m;
  endfunction

  // Counts over the w-1 pairs: [0] odd inversion helps, [1] full helps,
  // [2] full hurts.
  function automatic void ref_counts(bit [63:0] x, bit [63:0] y, int w,
                                     output int n_odd, output int n_dec, output int n_inc);
    bit [63:0] xo, xf;
    int c0, c1, c2;
    xo = x ^ odd_mask(w);
    xf = ~x;
    n_odd = 0; n_dec = 0; n_inc = 0;
    for (int i = 0; i + 1 < w; i++) begin
      c0 = ref_pair_cost(y[i], y[i+1], x[i],  x[i+1]);
      c1 = ref_pair_cost(y[i], y[i+1], xo[i], xo[i+1]);
      c2 = ref_pair_cost(y[i], y[i+1], xf[i], xf[i+1]);
      if (c1 < c0) n_odd++;
      if (c2 < c0) n_dec++;
      if (c2 > c0) n_inc++;
    end
  endfunction

  // Decision of the scheme II decision stage: 0 none, 1 odd, 2 full.
  function automatic int ref_decide(int n_odd, int n_dec, int n_inc, int w);
    int om, fm;
    om = 2 * n_odd - (w - 1);
    fm = n_dec - n_inc;
    if (fm > 0 && (om <= 0 || fm > om)) return 2;
    if (om > 0) return 1;
    return 0;
  endfunction

  // Scheme I encoding of x against y.
  function automatic bit [63:0] ref_enc1(bit [63:0] x, bit [63:0] y, int w, output bit inv);
    int a, b, c;
    ref_counts(x, y, w, a, b, c);
    inv = (2 * a > w - 1);
    return inv ? (x ^ odd_mask(w)) : x;
  endfunction

  // Scheme II encoding of x against y; act = 0 none, 1 odd, 2 full.
  function automatic bit [63:0] ref_enc2(bit [63:0] x, bit [63:0] y, int w, output int act);
    int a, b, c;
    bit [63:0] m;
    ref_counts(x, y, w, a, b, c);
    act = ref_decide(a, b, c, w);
    m = '0;
    for (int i = 0; i < w; i++) m[i] = 1'b1;
    if (act == 1) return x ^ odd_mask(w);
    if (act == 2) return x ^ m;
    return x;
  endfunction

endpackage
