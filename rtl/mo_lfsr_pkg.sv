// mo_lfsr_pkg: types and elaboration-time helpers shared by the
// multiple-output LFSR generators.
//
// A feedback polynomial 1 + x^k1 + x^k2 + ... + x^N is carried as a 64-bit
// mask (poly_t) with bit e set for every term x^e; bit 0 (the constant term)
// must be set. The helpers below derive from that mask the LFSR length N, the
// smallest non-constant exponent k1 (the number of bits that can be produced
// in parallel), the number of output groups of the Katti-style generator,
// ceil(N/k1), and the period of the Lowy-style generator, N/gcd(N,k1) XOR
// phases. The mask encoding is this design's own choice.
//
// Sequence convention used by every module: the generators produce the
// sequence s[t+N] = s[t] ^ XOR over the inner taps k of s[t+N-k]. Flip-flops are
// numbered 1..N as in the figures of the architectures; value s[m] lives in
// flip-flop N - (m mod N), so after seeding flip-flop N holds s[0] and
// flip-flop 1 holds s[N-1]. New bits overwrite the oldest value in place;
// nothing shifts.
package mo_lfsr_pkg;

  typedef logic [63:0] poly_t;

  // 1 + x^2 + x^5, the worked example of both architectures.
  localparam poly_t POLY_X5_X2 = 64'h25;

  // Length N: the highest exponent present.
  function automatic int unsigned poly_degree(poly_t p);
    int unsigned d = 0;
    for (int unsigned e = 1; e < 64; e++)
      if (p[e]) d = e;
    return d;
  endfunction

  // k1: the smallest exponent above 0, i.e. the number of parallel outputs.
  function automatic int unsigned poly_k1(poly_t p);
    for (int unsigned e = 1; e < 64; e++)
      if (p[e]) return e;
    return 0;
  endfunction

  function automatic int unsigned gcd(int unsigned a, int unsigned b);
    int unsigned x = a, y = b, r;
    while (y != 0) begin
      r = x % y;
      x = y;
      y = r;
    end
    return x;
  endfunction

  // Katti: ceil(N/k1) groups, each with one XOR phase and one trigger phase.
  function automatic int unsigned katti_groups(poly_t p);
    return (poly_degree(p) + poly_k1(p) - 1) / poly_k1(p);
  endfunction

  // Lowy: k1 fresh bits every XOR phase, so the flip-flop map repeats after
  // N/gcd(N,k1) XOR phases (N when N and k1 are coprime, as in every
  // polynomial the architectures were evaluated with).
  function automatic int unsigned lowy_period(poly_t p);
    return poly_degree(p) / gcd(poly_degree(p), poly_k1(p));
  endfunction

  // Flip-flop (1..N) that holds sequence value s[m].
  function automatic int unsigned ff_of(int unsigned m, int unsigned n);
    return n - (m % n);
  endfunction

endpackage
