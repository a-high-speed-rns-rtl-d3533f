// rns_pkg: constants, types and elaboration-time helper functions shared by the
// one-hot residue number system (RNS) processor.
//
// Every residue x mod m travels as a one-hot word of m lines: line v is high when
// the residue equals v.  A channel vector is MMAX lines wide; a channel whose
// modulus m is smaller than MMAX keeps lines m..MMAX-1 at zero.
//
// The moduli set, operand width and coefficient table below are this design's own
// choices: the set is made of primes, because the multiplier uses index calculus
// (discrete logarithms to a primitive root), and its range M = 37,182,145 holds a
// 32-term sum of products of 8-bit unsigned operands without wrapping.
// The helper functions run only at elaboration; they compute the hardwired
// permutations and OR patterns that replace look-up tables.
package rns_pkg;

  localparam int R     = 7;                                   // number of modulus channels
  localparam int MODULI [R] = '{5, 7, 11, 13, 17, 19, 23};   // m_1 .. m_r, pairwise prime
  localparam int MMAX  = 23;                                  // largest modulus
  localparam int DW    = 5;                                   // bits of a binary digit, clog2(MMAX)
  localparam int OW    = 26;                                  // bits of the binary result, clog2(M)
  localparam int NCOEF = 32;                                  // taps held by the coefficient decoder
  localparam int AW    = 5;                                   // bits of a coefficient address

  // One channel of a one-hot residue vector (unused upper lines are zero).
  typedef logic [MMAX-1:0] ohr_t;
  // All R channels.
  typedef ohr_t [R-1:0] ohr_vec_t;
  // Binary mixed-radix digits A_1 .. A_r.
  typedef logic [R-1:0][DW-1:0] digit_vec_t;
  // Coefficient table.
  typedef int unsigned coef_tab_t [NCOEF];

  // Processor operation, applied to every channel in the same clock cycle.
  typedef enum logic [2:0] {
    OP_NOP = 3'd0,   // hold the accumulator
    OP_CLR = 3'd1,   // accumulator := 0
    OP_ADD = 3'd2,   // accumulator := x + y
    OP_MUL = 3'd3,   // accumulator := x * y
    OP_MAC = 3'd4    // accumulator := accumulator + x * y
  } op_e;

  // ---------------------------------------------------------------- helpers
  function automatic int pow_mod(input int b, input int e, input int m);
    int r = 1 % m;
    for (int i = 0; i < e; i++) r = (r * (b % m)) % m;
    return r;
  endfunction

  // Multiplicative inverse of a modulo m (a and m coprime), found by search.
  function automatic int inv_mod(input int a, input int m);
    for (int k = 1; k < m; k++)
      if (((a % m) * k) % m == 1) return k;
    return 0;
  endfunction

  // Smallest primitive root of the prime m.
  function automatic int prim_root(input int m);
    for (int g = 2; g < m; g++) begin
      int ord = 0;
      int p = 1;
      for (int e = 1; e < m; e++) begin
        p = (p * g) % m;
        if (p == 1 && ord == 0) ord = e;
      end
      if (ord == m - 1) return g;
    end
    return 1;   // m = 2: the group is trivial, 1 generates it
  endfunction

  // Product m_1 * ... * m_i (the weight of mixed-radix digit A_{i+1}).
  function automatic longint mr_weight(input int i);
    longint w = 1;
    for (int j = 0; j < i; j++) w = w * MODULI[j];
    return w;
  endfunction

  function automatic longint binom(input int n, input int k);
    longint c = 1;
    for (int i = 1; i <= k; i++) c = c * (longint'(n) - longint'(k) + longint'(i)) / longint'(i);
    return c;
  endfunction

  // Smallest k such that a k-out-of-2k code has at least n words.
  function automatic int mofn_k(input int n);
    for (int k = 1; k < 16; k++)
      if (binom(2 * k, k) >= longint'(n)) return k;
    return 16;
  endfunction

  // Bit b of the v-th (from 0, in increasing numeric order) word of weight k among
  // 2k bits, gathered for v = 0..n-1 into a mask over the n input lines.
  function automatic logic [63:0] mofn_mask(input int n, input int k, input int b);
    logic [63:0] msk = '0;
    int cnt = 0;
    for (int w = 0; w < (1 << (2 * k)) && cnt < n; w++) begin
      int ones = 0;
      for (int i = 0; i < 2 * k; i++) ones += (w >> i) & 1;
      if (ones == k) begin
        msk[cnt] = 1'((w >> b) & 1);
        cnt++;
      end
    end
    return msk;
  endfunction

  // Default coefficient table: a 32-tap triangular window, c_k = 8*(min(k, 31-k) + 1) - 1.
  function automatic coef_tab_t default_coefs();
    coef_tab_t t;
    for (int k = 0; k < NCOEF; k++)
      t[k] = 8 * ((k < NCOEF - 1 - k ? k : NCOEF - 1 - k) + 1) - 1;
    return t;
  endfunction

endpackage
