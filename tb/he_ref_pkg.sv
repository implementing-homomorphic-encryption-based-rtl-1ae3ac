// he_ref_pkg: reference big-integer arithmetic for the testbenches.
//
// Plain modular arithmetic on RW-bit unsigned integers (products of values
// below 2^1120 fit, enough for 512-bit keys), written directly with the language's wide operators and
// independent of the Montgomery hardware: modular product and power, inverse
// by the extended Euclidean algorithm, Paillier key set-up with every
// constant the hardware takes as input, and Paillier encryption/decryption of
// values in Montgomery form (x R mod N^2, R = 2^(16*(w+1)), w = key bits / 8).
package he_ref_pkg;

  localparam int RW = 2240;
  typedef logic [RW-1:0] big_t;

  typedef struct {
    big_t p, q, n, n2, n2p2;
    big_t lambda, mu;
    big_t r_n2;          // R mod N^2
    big_t rinv_n2;       // R^-1 mod N^2
    big_t nr_n2;         // N R mod N^2
    big_t r2_n2;         // R^2 mod N^2
    big_t ninv_r2_n2p2;  // N^-1 R^2 mod (N^2 + 2)
    big_t mu_r2_n;       // mu R^2 mod N
    int   key_bits;
  } key_t;

  function automatic big_t mulmod(big_t a, big_t b, big_t m);
    return ((a % m) * (b % m)) % m;
  endfunction

  function automatic big_t powmod(big_t b, big_t e, big_t m);
    big_t r, x;
    r = big_t'(1) % m;
    x = b % m;
    while (e != '0) begin
      if (e[0]) r = mulmod(r, x, m);
      x = mulmod(x, x, m);
      e = e >> 1;
    end
    return r;
  endfunction

  function automatic big_t gcd(big_t a, big_t b);
    big_t t;
    while (b != '0) begin
      t = a % b;
      a = b;
      b = t;
    end
    return a;
  endfunction

  // a^-1 mod m (a and m coprime); Bezout coefficients kept reduced mod m.
  function automatic big_t modinv(big_t a, big_t m);
    big_t r0, r1, t0, t1, q, tmp;
    r0 = m;
    r1 = a % m;
    t0 = '0;
    t1 = big_t'(1);
    while (r1 != '0) begin
      q   = r0 / r1;
      tmp = r0 - q * r1;
      r0  = r1;
      r1  = tmp;
      tmp = (t0 + m - mulmod(q, t1, m)) % m;
      t0  = t1;
      t1  = tmp;
    end
    return t0;
  endfunction

  function automatic key_t make_key(big_t p, big_t q, int key_bits);
    key_t k;
    big_t r, r2n, r2np2;
    k.key_bits = key_bits;
    k.p    = p;
    k.q    = q;
    k.n    = p * q;
    k.n2   = k.n * k.n;
    k.n2p2 = k.n2 + big_t'(2);
    k.lambda = ((p - 1) * (q - 1)) / gcd(p - 1, q - 1);
    k.mu     = modinv(k.lambda % k.n, k.n);
    r = big_t'(1) << (16 * (key_bits / 8 + 1));
    k.r_n2    = r % k.n2;
    k.rinv_n2 = modinv(k.r_n2, k.n2);
    k.nr_n2   = mulmod(k.n, r, k.n2);
    k.r2_n2   = mulmod(r, r, k.n2);
    r2np2          = mulmod(r, r, k.n2p2);
    k.ninv_r2_n2p2 = mulmod(modinv(k.n, k.n2p2), r2np2, k.n2p2);
    r2n            = mulmod(r, r, k.n);
    k.mu_r2_n      = mulmod(k.mu, r2n, k.n);
    return k;
  endfunction

  function automatic big_t to_mont(key_t k, big_t a);
    return mulmod(a, k.r_n2, k.n2);
  endfunction

  function automatic big_t from_mont(key_t k, big_t a);
    return mulmod(a, k.rinv_n2, k.n2);
  endfunction

  // Ciphertext (N m + 1) r^N mod N^2, returned in Montgomery form.
  function automatic big_t encrypt_m(key_t k, big_t m, big_t r);
    big_t c;
    c = mulmod(k.n * (m % k.n) + big_t'(1), powmod(r, k.n, k.n2), k.n2);
    return to_mont(k, c);
  endfunction

  // Ciphertext as the hardware forms it from a raw random number: the raw
  // value is taken as the Montgomery form of r R^-1.
  function automatic big_t encrypt_hw(key_t k, big_t m, big_t raw);
    return encrypt_m(k, m, mulmod(raw, k.rinv_n2, k.n2));
  endfunction

  // Plaintext of a ciphertext given in Montgomery form (possibly unreduced).
  function automatic big_t decrypt_m(key_t k, big_t cm);
    big_t c, l;
    c = from_mont(k, cm);
    l = (powmod(c, k.lambda, k.n2) - big_t'(1)) / k.n;
    return mulmod(l, k.mu, k.n);
  endfunction

  // Random value below m (m > 1).
  function automatic big_t rand_below(big_t m);
    big_t v;
    v = '0;
    for (int w = 0; w < RW / 32; w++) v[w*32 +: 32] = $urandom;
    return v % m;
  endfunction

endpackage
