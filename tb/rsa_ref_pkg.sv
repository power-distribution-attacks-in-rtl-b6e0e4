// rsa_ref_pkg: reference big-number arithmetic for the RSA testbenches.
//
// Plain schoolbook operations on 1024-bit values (products on 2048 bits):
// modular multiply and power, gcd, modular inverse, CRT recombination, and
// the key-recovery check that a faulty CRT result exposes a prime factor.
// None of it shares code or structure with the Montgomery datapath it checks.
package rsa_ref_pkg;
  typedef logic [1023:0] big_t;
  typedef logic [2047:0] dbl_t;

  function automatic big_t mulmod(big_t a, big_t b, big_t m);
    dbl_t prod;
    prod = dbl_t'(a) * dbl_t'(b);
    return big_t'(prod % dbl_t'(m));
  endfunction

  function automatic big_t powmod(big_t b, big_t e, big_t m);
    big_t r, base;
    r    = big_t'(1) % m;
    base = b % m;
    for (int i = 0; i < 1024; i++) begin
      if (e[i]) r = mulmod(r, base, m);
      base = mulmod(base, base, m);
    end
    return r;
  endfunction

  function automatic big_t gcd(big_t a, big_t b);
    big_t t;
    while (b != 0) begin
      t = a % b;
      a = b;
      b = t;
    end
    return a;
  endfunction

  // Inverse of a modulo m (gcd(a, m) = 1 assumed), extended Euclid with
  // the coefficients kept in [0, m).
  function automatic big_t modinv(big_t a, big_t m);
    big_t r0, r1, t0, t1, qt, tmp;
    r0 = m; r1 = a % m; t0 = 0; t1 = 1;
    while (r1 != 0) begin
      qt  = r0 / r1;
      tmp = r0 - qt * r1; r0 = r1; r1 = tmp;
      tmp = (t0 + m - mulmod(qt, t1, m)) % m; t0 = t1; t1 = tmp;
    end
    return t0;
  endfunction

  // Y mod p*q from Y mod p and Y mod q (Garner's formula).
  function automatic big_t crt_combine(big_t yp, big_t yq, big_t p, big_t q);
    big_t h;
    h = mulmod((yp + p - (yq % p)) % p, modinv(q % p, p), p);
    return yq + q * h;
  endfunction

  // Lenstra's check: gcd(X - Y^e mod N, N).
  function automatic big_t lenstra_factor(big_t x, big_t y, big_t e, big_t n);
    big_t ye;
    ye = powmod(y, e, n);
    return gcd((x % n + n - ye) % n, n);
  endfunction
endpackage
