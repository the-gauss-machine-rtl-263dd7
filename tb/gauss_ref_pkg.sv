// gauss_ref_pkg: reference arithmetic for the testbenches, written
// independently of the RTL tables. Everything here is brute force on
// integers: powers by repeated multiplication, logarithms by search, square
// roots of -1 by search.
package gauss_ref_pkg;

  localparam int REF_P [3] = '{113, 109, 101};
  localparam int REF_G [3] = '{3, 6, 2};
  localparam int ZC = 127;   // zero code of the log representation

  function automatic int pmod(longint x, int p);
    longint r;
    r = x % longint'(p);
    if (r < 0) r += longint'(p);
    return int'(r);
  endfunction

  function automatic int rpow(int g, int e, int p);
    longint r;
    r = 1;
    for (int i = 0; i < e; i++) r = (r * g) % longint'(p);
    return int'(r);
  endfunction

  // log form of residue x: exponent, or ZC for 0
  function automatic int rlog(int x, int g, int p);
    longint r;
    if (pmod(longint'(x), p) == 0) return ZC;
    r = 1;
    for (int i = 0; i < p - 1; i++) begin
      if (r == longint'(pmod(longint'(x), p))) return i;
      r = (r * g) % longint'(p);
    end
    return -1;
  endfunction

  // residue form of a log code
  function automatic int rexp(int e, int g, int p);
    if (e >= p - 1) return 0;
    return rpow(g, e, p);
  endfunction

  function automatic int rj(int p);
    for (int x = 1; x < p; x++) if ((x * x) % p == p - 1) return x;
    return -1;
  endfunction

  // QRNS channel value of a + jb for modulus index m, half h (0: z, 1: z*)
  function automatic int qrns(longint a, longint b, int m, int h);
    int p;
    p = REF_P[m];
    if (h == 0) return pmod(a + longint'(rj(p)) * b, p);
    return pmod(a - longint'(rj(p)) * b, p);
  endfunction

  // Packed 42-bit word of log codes for a + jb, laid out like gauss_pkg::qword_t
  // ({z[2], z[1], z[0], zs[2], zs[1], zs[0]}).
  function automatic logic [41:0] enc_log(longint a, longint b);
    logic [41:0] w;
    for (int m = 0; m < 3; m++) begin
      w[21 + 7*m +: 7] = 7'(rlog(qrns(a, b, m, 0), REF_G[m], REF_P[m]));
      w[7*m +: 7]      = 7'(rlog(qrns(a, b, m, 1), REF_G[m], REF_P[m]));
    end
    return w;
  endfunction

  // Same layout, residue form.
  function automatic logic [41:0] enc_res(longint a, longint b);
    logic [41:0] w;
    for (int m = 0; m < 3; m++) begin
      w[21 + 7*m +: 7] = 7'(qrns(a, b, m, 0));
      w[7*m +: 7]      = 7'(qrns(a, b, m, 1));
    end
    return w;
  endfunction

  function automatic int rand_range(int lo, int hi);
    return lo + int'($urandom_range(hi - lo));
  endfunction

endpackage
