// gauss_pkg: constants, types and constant functions shared by the GEQRNS
// (Galois-enhanced quadratic residue number system) array.
//
// The machine works on three 7-bit primes of the form 4k+1. Each prime carries
// two independent QRNS channels, z and z*, so there are six channels in all.
// Inside the array a non-zero residue x travels as its number-theoretic
// logarithm e, where alpha^e = x (mod p). The all-ones code stands for the
// residue 0, which has no logarithm.
//
// From the paper: 7-bit moduli, p = 113 with generator alpha = 3 for the
// single-modulus cell, three moduli giving a dynamic range of 20.2 bits.
// This design's choice: the other two moduli are 109 and 101, the two next
// largest 7-bit primes of the form 4k+1. 113*109*101 = 1,244,017 gives the
// stated 20.2 bits (122 dB). Their generators 6 and 2 are the smallest
// primitive roots. The zero code and the command encoding are also this
// design's own.
//
// The constant functions below build the lookup tables at elaboration, so no
// table data files are needed.
package gauss_pkg;

  localparam int unsigned DW   = 7;          // bits per residue digit
  localparam int unsigned NMOD = 3;          // number of GEQRNS moduli
  localparam int unsigned NCH  = 2 * NMOD;   // z and z* channel per modulus

  typedef logic [DW-1:0] digit_t;

  // Code for "residue is zero" in exponent (log) form.
  localparam digit_t ZERO_CODE = '1;

  localparam int unsigned MODULI [NMOD] = '{113, 109, 101};
  localparam int unsigned ALPHAS [NMOD] = '{3, 6, 2};

  // One GEQRNS word: the log-form or residue-form digit of every channel.
  typedef struct packed {
    digit_t [NMOD-1:0] z;    // z  = a + j^ b  (mod p_i)
    digit_t [NMOD-1:0] zs;   // z* = a - j^ b  (mod p_i)
  } qword_t;

  // Array controller commands.
  typedef enum logic [1:0] {
    OP_MATMUL = 2'd0,   // array mode: blocks of a 2x2 matrix product
    OP_VMUL   = 2'd1,   // vector mode: pointwise multiply
    OP_VADD   = 2'd2,   // vector mode: add groups of operands (b forced to 1)
    OP_VMAC   = 2'd3    // vector mode: multiply-accumulate over groups (inner product)
  } op_e;

  // (b^e) mod p by repeated multiplication.
  function automatic int unsigned modpow(int unsigned b, int unsigned e, int unsigned p);
    int unsigned r;
    r = 1;
    for (int unsigned i = 0; i < e; i++) r = (r * b) % p;
    return r;
  endfunction

  // Entry i of the combined "mod p-1 then exponentiate" table.
  function automatic int unsigned exp_entry(int unsigned p, int unsigned alpha, int unsigned i);
    return modpow(alpha, i % (p - 1), p);
  endfunction

  // Entry x of the number-theoretic logarithm table; zero code for x = 0 or x >= p.
  function automatic int unsigned log_entry(int unsigned p, int unsigned alpha, int unsigned x,
                                            int unsigned zero_code);
    int unsigned r;
    if (x == 0 || x >= p) return zero_code;
    r = 1;
    for (int unsigned i = 0; i < p - 1; i++) begin
      if (r == x) return i;
      r = (r * alpha) % p;
    end
    return zero_code;
  endfunction

  // j^: the smaller solution of x^2 = -1 (mod p).
  function automatic int unsigned jhat(int unsigned p);
    for (int unsigned x = 1; x < p; x++)
      if ((x * x) % p == p - 1) return x;
    return 0;
  endfunction

  // Multiplicative inverse of a modulo p (p prime, a not 0 mod p).
  function automatic int unsigned modinv(longint unsigned a, int unsigned p);
    int unsigned am;
    am = int'(a % longint'(p));
    for (int unsigned x = 1; x < p; x++)
      if ((am * x) % p == 1) return x;
    return 0;
  endfunction

  // Dynamic range M = product of the moduli.
  function automatic longint unsigned range_m();
    longint unsigned m;
    m = 1;
    for (int i = 0; i < NMOD; i++) m = m * MODULI[i];
    return m;
  endfunction

endpackage
