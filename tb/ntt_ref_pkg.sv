// ntt_ref_pkg: reference arithmetic for the testbenches, written
// independently of the RTL: plain modular arithmetic on 64-bit integers, a
// textbook decimation-in-frequency NTT, schoolbook negacyclic multiplication,
// and the host-side table layouts the multiplier expects.
// Test primes (all q = 1 mod 2048): 2101249 (22 bit), 132120577 (27 bit),
// 4293918721 (32 bit), with primitive 2048-th roots of unity psi.
package ntt_ref_pkg;
  typedef longint unsigned u64;
  typedef logic [1023:0][31:0] poly_t;

  localparam u64 Q22 = 64'd2101249,    PSI22 = 64'd987173;
  localparam u64 Q27 = 64'd132120577,  PSI27 = 64'd113022246;
  localparam u64 Q32 = 64'd4293918721, PSI32 = 64'd382465279;

  function automatic u64 mulmod(u64 a, u64 b, u64 q);
    u64 r;
    r = 0;
    // a, b < 2^32 so a*b fits 64 bits
    r = (a * b) % q;
    return r;
  endfunction

  function automatic u64 addmod(u64 a, u64 b, u64 q);
    return (a + b) % q;
  endfunction

  function automatic u64 submod(u64 a, u64 b, u64 q);
    return (a + q - (b % q)) % q;
  endfunction

  function automatic u64 powmod(u64 b, u64 e, u64 q);
    u64 r;
    r = 1;
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

  // Montgomery constant R = 2^33 mod q and the Montgomery form x*R mod q
  function automatic u64 rmod(u64 q);
    return (64'd1 << 33) % q;
  endfunction
  function automatic u64 to_mont(u64 x, u64 q);
    return mulmod(x % q, rmod(q), q);
  endfunction
  // expected Montgomery product a*b*R^-1 mod q
  function automatic u64 mont_ref(u64 a, u64 b, u64 q);
    return mulmod(mulmod(a % q, b % q, q), invmod(rmod(q), q), q);
  endfunction

  function automatic int unsigned bitrev10(int unsigned x);
    int unsigned r;
    r = 0;
    for (int i = 0; i < 10; i++) if (x[i]) r |= (1 << (9 - i));
    return r;
  endfunction

  // Textbook in-place DIF NTT (natural in, bit-reversed out).
  function automatic poly_t ntt_dif(poly_t a, u64 omega, u64 q);
    for (int len = 1024; len >= 2; len /= 2) begin
      int half;
      u64 wl;
      half = len / 2;
      wl = powmod(omega, 64'(1024 / len), q);
      for (int st = 0; st < 1024; st += len) begin
        u64 w;
        w = 1;
        for (int k = 0; k < half; k++) begin
          u64 x, y;
          x = a[st + k];
          y = a[st + k + half];
          a[st + k]        = 32'(addmod(x, y, q));
          a[st + k + half] = 32'(mulmod(submod(x, y, q), w, q));
          w = mulmod(w, wl, q);
        end
      end
    end
    return a;
  endfunction

  // Schoolbook product in Z_q[x]/(x^1024 + 1).
  function automatic poly_t negacyclic(poly_t a, poly_t b, u64 q);
    u64 acc [1024];
    poly_t r;
    for (int i = 0; i < 1024; i++) acc[i] = 0;
    for (int i = 0; i < 1024; i++)
      for (int j = 0; j < 1024; j++) begin
        u64 p;
        p = mulmod(a[i], b[j], q);
        if (i + j < 1024) acc[i + j] = addmod(acc[i + j], p, q);
        else              acc[i + j - 1024] = submod(acc[i + j - 1024], p, q);
      end
    for (int i = 0; i < 1024; i++) r[i] = 32'(acc[i]);
    return r;
  endfunction

  // Key as the multiplier stores it: NTT of (p_j * psi^j), in the scrambled
  // order the forward transform produces, in Montgomery form.
  function automatic poly_t key_image(poly_t p, u64 psi, u64 q);
    poly_t t;
    for (int j = 0; j < 1024; j++) t[j] = 32'(mulmod(p[j], powmod(psi, 64'(j), q), q));
    t = ntt_dif(t, mulmod(psi, psi, q), q);
    for (int j = 0; j < 1024; j++) t[j] = 32'(to_mont(t[j], q));
    return t;
  endfunction

  // Twiddle exponent for butterfly unit u at stage s (span 2^s), cycle c.
  // Coefficient position i sits in bank (i>>3)^(i&7), word i&7. Partners
  // differ in bank bit j (= s-3 for s >= 3, else s); at s >= 3 every bank
  // reads word c, at s < 3 bank b reads word c^(b&7). Unit u takes the pair
  // whose banks equal u with a bit inserted at j; the "top" bank (lower
  // position) has that bit equal to c[j] for j < 3, else 0.
  function automatic int unsigned tw_exp(int unsigned u, int unsigned s, int unsigned c);
    int unsigned j, t, lo, bt, a, h, i, m;
    j  = (s >= 3) ? s - 3 : s;
    t  = (j < 3) ? ((c >> j) & 1) : 0;
    lo = u & ((1 << j) - 1);
    bt = ((u >> j) << (j + 1)) | (t << j) | lo;
    a  = (s >= 3) ? c : (c ^ (bt & 7));
    h  = bt ^ a;
    i  = (h << 3) | a;
    m  = 1 << s;
    return (i % m) * (1024 / (2 * m));
  endfunction
endpackage
