// rpm_wide_tb_pkg: reference arithmetic on 128-bit integers for primes of up to 63
// bits: modular power and inverse, a Miller-Rabin prime test (bases 2..37, exact
// below 2^64), a search for an S-bit prime q = 1 mod 2n, a primitive 2n-th root of
// unity and the Barrett constant floor(2^(2S)/q).
package rpm_wide_tb_pkg;
  typedef logic [127:0] u128;

  function automatic u128 mulmod(u128 a, u128 b, u128 q);
    return (a * b) % q;          // a, b < 2^63, so the product fits in 128 bits
  endfunction

  function automatic u128 powmod(u128 b, u128 e, u128 q);
    u128 r = 1;
    b = b % q;
    while (e != 0) begin
      if (e[0]) r = mulmod(r, b, q);
      b = mulmod(b, b, q);
      e = e >> 1;
    end
    return r;
  endfunction

  function automatic u128 invmod(u128 a, u128 q);
    return powmod(a, q - 2, q);
  endfunction

  function automatic bit is_prime(u128 p);
    int unsigned bases [12] = '{2, 3, 5, 7, 11, 13, 17, 19, 23, 29, 31, 37};
    u128 d = p - 1;
    int unsigned r = 0;
    if (p < 2) return 0;
    foreach (bases[i]) begin
      if (p == u128'(bases[i])) return 1;
      if (p % u128'(bases[i]) == 0) return 0;
    end
    while (!d[0]) begin d = d >> 1; r++; end
    foreach (bases[i]) begin
      u128 x = powmod(u128'(bases[i]), d, p);
      bit comp = (x != 1 && x != p - 1);
      for (int unsigned k = 1; k < r && comp; k++) begin
        x = mulmod(x, x, p);
        if (x == p - 1) comp = 0;
      end
      if (comp) return 0;
    end
    return 1;
  endfunction

  // The (skip+1)-th largest S-bit prime q with q = 1 mod 2n.
  function automatic u128 find_prime(int unsigned s, int unsigned n, int unsigned skip);
    u128 m = 2 * u128'(n);
    u128 k = ((u128'(1) << s) - 1) / m;
    for (; k * m + 1 > (u128'(1) << (s - 1)); k--) begin
      if (is_prime(k * m + 1)) begin
        if (skip == 0) return k * m + 1;
        skip--;
      end
    end
    return 0;
  endfunction

  function automatic u128 find_psi(u128 q, int unsigned n);
    for (u128 g = 2; g < q; g++) begin
      u128 c = powmod(g, (q - 1) / (2 * u128'(n)), q);
      if (powmod(c, u128'(n), q) == q - 1) return c;
    end
    return 0;
  endfunction

  function automatic u128 barrett_mu(u128 q, int unsigned s);
    return (u128'(1) << (2 * s)) / q;
  endfunction
endpackage
