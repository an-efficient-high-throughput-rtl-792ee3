// bch_ref_pkg: reference arithmetic for the BCH(15,k) testbenches.
//
// Deliberately built differently from the design: field products go through
// logarithm / antilogarithm lookups computed from integer shifts, encoding is
// polynomial long division on integers, syndromes are direct sums of powers
// and error-locator polynomials are formed as products (1 + X_l x) from the
// known error positions. Words are ints, bit i = coefficient of x^i.
package bch_ref_pkg;

  // alpha^e, alpha a root of x^4 + x + 1
  function automatic int ref_exp(input int e);
    int v = 1;
    for (int i = 0; i < ((e % 15) + 15) % 15; i++) begin
      v = v << 1;
      if (v & 16) v = v ^ 'h13;
    end
    return v;
  endfunction

  function automatic int ref_log(input int a);
    for (int i = 0; i < 15; i++)
      if (ref_exp(i) == a) return i;
    return -1;
  endfunction

  function automatic int ref_mul(input int a, input int b);
    if (a == 0 || b == 0) return 0;
    return ref_exp(ref_log(a) + ref_log(b));
  endfunction

  function automatic int ref_k(input int t);
    return (t == 1) ? 11 : (t == 2) ? 7 : 5;
  endfunction

  function automatic int ref_gen(input int t);
    return (t == 1) ? 'h13 : (t == 2) ? 'h1D1 : 'h537;
  endfunction

  // systematic codeword: data in the top k bits, remainder in the low n-k
  function automatic int ref_encode(input int t, input int data);
    int p  = 15 - ref_k(t);
    int cw = data << p;
    int rm = cw;
    for (int d = 14; d >= p; d--)
      if ((rm >> d) & 1) rm = rm ^ (ref_gen(t) << (d - p));
    return cw | rm;
  endfunction

  // S_j = r(alpha^j)
  function automatic int ref_syn(input int word, input int j);
    int s = 0;
    for (int i = 0; i < 15; i++)
      if ((word >> i) & 1) s = s ^ ref_exp(i * j);
    return s;
  endfunction

  function automatic int popcount15(input int w);
    int c = 0;
    for (int i = 0; i < 15; i++) c += (w >> i) & 1;
    return c;
  endfunction

  // coefficient j of prod over error positions p of (1 + alpha^p x)
  function automatic int ref_locator_coef(input int err, input int j);
    int c[4];
    c = '{1, 0, 0, 0};
    for (int p = 0; p < 15; p++)
      if ((err >> p) & 1)
        for (int i = 3; i >= 1; i--)
          c[i] = c[i] ^ ref_mul(c[i-1], ref_exp(p));
    return c[j];
  endfunction

  // random error pattern of exactly w ones in 15 bits
  function automatic int rand_err(input int w);
    int e = 0;
    while (popcount15(e) < w) e = e | (1 << ($urandom % 15));
    return e;
  endfunction

endpackage
