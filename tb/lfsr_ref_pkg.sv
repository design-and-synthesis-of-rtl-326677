// lfsr_ref_pkg: reference models used by the testbenches. They are written
// from the polynomial's tap positions (x^k -> bit k-1), independently of the
// tap masks and code in the RTL.
package lfsr_ref_pkg;

  typedef int unsigned taps_t[4];

  // Tap positions (exponents) of the characteristic polynomials.
  localparam taps_t TAPS32 = '{32, 22, 2, 1};
  localparam taps_t TAPS16 = '{16, 15, 13, 4};
  localparam taps_t TAPS8  = '{8, 6, 5, 4};

  // One step of an n-bit Fibonacci LFSR: shift towards the MSB, new LSB is
  // the XOR of the bits at the tap positions.
  function automatic logic [63:0] ref_step(logic [63:0] s, int unsigned n, taps_t t);
    logic fb = 1'b0;
    foreach (t[k]) fb ^= s[t[k]-1];
    ref_step = ((s << 1) | 64'(fb)) & ((64'd1 << n) - 1);
  endfunction

  // Output vector of the low-power generator in phase p (0..3), given the
  // present state t1 and next state t2: bit i comes from t2 when i mod 4 < p.
  function automatic logic [63:0] ref_lp(logic [63:0] t1, logic [63:0] t2, int p, int unsigned n);
    logic [63:0] r = t1;
    for (int i = 0; i < int'(n); i++)
      if ((i % 4) < p) r[i] = t2[i];
    return r;
  endfunction

  // One MISR step: the LFSR step of the signature, XOR the response word.
  function automatic logic [63:0] ref_misr(logic [63:0] s, logic [63:0] d, int unsigned n, taps_t t);
    return ref_step(s, n, t) ^ (d & ((64'd1 << n) - 1));
  endfunction

  // Reference for the behavioural CUT (see cut_model.sv).
  function automatic logic [31:0] ref_cut(logic [31:0] x);
    logic [15:0] h = x[31:16] ^ x[15:0];
    logic [15:0] a = x[31:16] + x[15:0];
    return {h[12:0], h[15:13], a};
  endfunction

  // Polynomial product a*b mod m over GF(2), degree of m is n (<= 32).
  function automatic logic [63:0] gf2_mulmod(logic [63:0] a, logic [63:0] b,
                                             logic [63:0] m, int unsigned n);
    logic [63:0] r = '0;
    for (int i = int'(n) - 1; i >= 0; i--) begin
      r = r << 1;
      if (r[n]) r ^= m;
      if (b[i]) r ^= a;
    end
    return r;
  endfunction

  // x^e mod m over GF(2).
  function automatic logic [63:0] gf2_xpow(logic [63:0] e, logic [63:0] m, int unsigned n);
    logic [63:0] r = 64'd1;
    logic [63:0] b = 64'd2;
    while (e != 0) begin
      if (e[0]) r = gf2_mulmod(r, b, m, n);
      b = gf2_mulmod(b, b, m, n);
      e = e >> 1;
    end
    return r;
  endfunction

  function automatic int unsigned popcount(logic [63:0] v);
    int unsigned c = 0;
    for (int i = 0; i < 64; i++) c += v[i];
    return c;
  endfunction

endpackage
