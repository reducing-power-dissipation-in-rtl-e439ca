// qrns_pkg: constants, types and elaboration-time number theory shared by the
// QRNS complex FIR filter.
//
// The filter works in a Quadratic Residue Number System over the five primes
// {5, 13, 17, 29, 41}. All of them are of the form 4k+1, so q*q = -1 has a
// solution q in every ring Z_m and a complex number maps to a pair of
// independent residues. Their product, 1 313 845, gives a dynamic range of
// about 20.3 bits. The moduli set, the 10-bit complex input and the 64 taps
// follow the source design.
//
// The functions below are evaluated at elaboration only. They derive the
// per-modulus constants that the source design leaves open: the root q of
// q*q = -1 (the smallest one is taken), the primitive radix r used for the
// isomorphic (logarithmic) multiplier (again the smallest), discrete
// logarithms and modular inverses. Nothing here becomes hardware by itself.
package qrns_pkg;

  // Number of moduli and the moduli themselves.
  localparam int NMOD = 5;
  localparam int MODULI [NMOD] = '{5, 13, 17, 29, 41};

  // Width of the two's complement real and imaginary parts of samples and
  // coefficients.
  localparam int IN_W = 10;

  // Width of a residue or index code field wide enough for every modulus
  // ($clog2(41) = 6). Narrower moduli use the low bits.
  localparam int CODE_W = 6;

  // Width of the signed binary output: the dynamic range M = 1 313 845 is
  // mapped to [-(M-1)/2, (M-1)/2], which needs 21 bits.
  localparam int OUT_W = 21;

  typedef logic [CODE_W-1:0] code_t;
  typedef logic signed [IN_W-1:0] sample_t;
  typedef logic signed [OUT_W-1:0] result_t;

  // Product of all moduli.
  function automatic int dyn_range();
    int p = 1;
    for (int i = 0; i < NMOD; i++) p = p * MODULI[i];
    return p;
  endfunction

  // b**e mod m, by repeated multiplication (small operands only).
  function automatic int pow_mod(int b, int e, int m);
    int r = 1 % m;
    for (int i = 0; i < e; i++) r = (r * b) % m;
    return r;
  endfunction

  // Smallest primitive root of the prime m.
  function automatic int prim_root(int m);
    for (int g = 2; g < m; g++) begin
      int acc = 1;
      bit ok = 1'b1;
      for (int e = 1; e < m - 1; e++) begin
        acc = (acc * g) % m;
        if (acc == 1) ok = 1'b0;
      end
      if (ok) return g;
    end
    return 1;
  endfunction

  // Smallest q with q*q = -1 (mod m).
  function automatic int sqrt_neg1(int m);
    for (int q = 1; q < m; q++)
      if ((q * q) % m == m - 1) return q;
    return 0;
  endfunction

  // Multiplicative inverse of a modulo m (a and m coprime).
  function automatic int inv_mod(int a, int m);
    for (int x = 1; x < m; x++)
      if (((a % m) * x) % m == 1) return x;
    return 0;
  endfunction

  // Discrete logarithm of n (1 <= n < m) to the base r; 0 if none exists.
  function automatic int dlog(int n, int r, int m);
    int acc = 1;
    for (int w = 0; w < m - 1; w++) begin
      if (acc == n) return w;
      acc = (acc * r) % m;
    end
    return 0;
  endfunction

endpackage
