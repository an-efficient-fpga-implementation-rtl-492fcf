// tb_rns_util: reference arithmetic for the residue testbenches, written
// independently of the design.  Integer helpers work on values below 2^32
// with 64-bit intermediates; polynomial helpers treat a 64-bit vector as a
// polynomial over GF(2) (bit i = coefficient of x^i).
// Reference arithmetic only, independent of the design.
package tb_rns_util;

  function automatic longint unsigned gcd64(longint unsigned a, longint unsigned b);
    longint unsigned t;
    while (b != 0) begin
      t = a % b;
      a = b;
      b = t;
    end
    return a;
  endfunction

  // inverse of a modulo m (gcd must be 1), extended Euclid
  function automatic longint unsigned inv_int(longint unsigned a, longint unsigned m);
    longint r0 = longint'(m), r1 = longint'(a % m), t0 = 0, t1 = 1, q, tmp;
    while (r1 != 0) begin
      q = r0 / r1;
      tmp = r0 - q * r1; r0 = r1; r1 = tmp;
      tmp = t0 - q * t1; t0 = t1; t1 = tmp;
    end
    if (t0 < 0) t0 += longint'(m);
    return longint'(t0);
  endfunction

  function automatic int pdeg(longint unsigned v);
    int d = -1;
    for (int i = 0; i < 64; i++) if (v[i]) d = i;
    return d;
  endfunction

  function automatic longint unsigned pmul(longint unsigned a, longint unsigned b);
    longint unsigned r = 0;
    for (int i = 0; i < 64; i++) if (a[i]) r ^= b << i;
    return r;
  endfunction

  function automatic longint unsigned pmod(longint unsigned a, longint unsigned m);
    int dm = pdeg(m);
    for (int i = 63; i >= dm; i--) if (a[i]) a ^= m << (i - dm);
    return a;
  endfunction

  function automatic longint unsigned pdiv(longint unsigned a, longint unsigned m);
    int dm = pdeg(m);
    longint unsigned q = 0;
    for (int i = 63; i >= dm; i--)
      if (a[i]) begin
        a ^= m << (i - dm);
        q[i - dm] = 1'b1;
      end
    return q;
  endfunction

  function automatic longint unsigned pgcd(longint unsigned a, longint unsigned b);
    longint unsigned t;
    while (b != 0) begin
      t = pmod(a, b);
      a = b;
      b = t;
    end
    return a;
  endfunction

  // inverse of polynomial a modulo m (must be coprime)
  function automatic longint unsigned inv_poly(longint unsigned a, longint unsigned m);
    longint unsigned r0 = m, r1 = pmod(a, m), t0 = 0, t1 = 1, q, tmp;
    while (r1 != 0) begin
      q = pdiv(r0, r1);
      tmp = r0 ^ pmul(q, r1); r0 = r1; r1 = tmp;
      tmp = t0 ^ pmul(q, t1); t0 = t1; t1 = tmp;
    end
    return pmod(t0, m);
  endfunction

  // field-generic helpers: f = 1 integers, f = 0 polynomials
  function automatic longint unsigned mulmod(bit f, longint unsigned a, longint unsigned b,
                                             longint unsigned m);
    return f ? (a * b) % m : pmod(pmul(a, b), m);
  endfunction

  function automatic longint unsigned invmod(bit f, longint unsigned a, longint unsigned m);
    return f ? inv_int(a, m) : inv_poly(a, m);
  endfunction

  function automatic bit coprime(bit f, longint unsigned a, longint unsigned m);
    return f ? (gcd64(a % m, m) == 1) : (pgcd(m, pmod(a, m)) == 1);
  endfunction

endpackage
