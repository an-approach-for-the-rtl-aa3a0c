// rpm_tb_pkg: reference arithmetic for the testbenches, on 64-bit integers and
// independent of the RTL: modular power and inverse, a search for an S-bit prime q
// with 2n | q-1, a primitive 2n-th root of unity psi, the Barrett constant
// floor(2^(2S)/q), bit reversal, and naive transforms and negacyclic products.
package rpm_tb_pkg;
  typedef longint unsigned u64;

  function automatic u64 mulmod(u64 a, u64 b, u64 q);
    return (a * b) % q;          // a, b < 2^31, so the product fits in 64 bits
  endfunction

  function automatic u64 powmod(u64 b, u64 e, u64 q);
    u64 r = 1;
    b = b % q;
    while (e != 0) begin
      if (e[0]) r = mulmod(r, b, q);
      b = mulmod(b, b, q);
      e = e >> 1;
    end
    return r;
  endfunction

  function automatic u64 invmod(u64 a, u64 q);
    return powmod(a, q - 2, q);
  endfunction

  function automatic bit is_prime(u64 p);
    if (p < 2) return 0;
    for (u64 d = 2; d * d <= p; d++) if (p % d == 0) return 0;
    return 1;
  endfunction

  // The (skip+1)-th largest S-bit prime q with q = 1 mod 2n.
  function automatic u64 find_prime(int unsigned s, int unsigned n, int unsigned skip);
    u64 m = 2 * u64'(n);
    u64 k = ((u64'(1) << s) - 1) / m;
    for (; k * m + 1 > (u64'(1) << (s - 1)); k--) begin
      if (is_prime(k * m + 1)) begin
        if (skip == 0) return k * m + 1;
        skip--;
      end
    end
    return 0;
  endfunction

  // A primitive 2n-th root of unity modulo q (psi^n = -1).
  function automatic u64 find_psi(u64 q, int unsigned n);
    for (u64 g = 2; g < q; g++) begin
      u64 c = powmod(g, (q - 1) / (2 * u64'(n)), q);
      if (powmod(c, u64'(n), q) == q - 1) return c;
    end
    return 0;
  endfunction

  function automatic u64 barrett_mu(u64 q, int unsigned s);
    return (u64'(1) << (2 * s)) / q;
  endfunction

  function automatic int unsigned bitrev(int unsigned x, int unsigned bits);
    int unsigned r = 0;
    for (int unsigned i = 0; i < bits; i++) if (x & (1 << i)) r |= 1 << (bits - 1 - i);
    return r;
  endfunction
endpackage
