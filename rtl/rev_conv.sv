// rev_conv: reverse conversion of a six-channel QRNS result word to a signed
// complex integer.
//
// For each modulus p_i the inverse QRNS mapping gives the real and imaginary
// residues:
//   re_i = <2^-1 (z + z*)>_p,   im_i = <2^-1 j^-1 (z - z*)>_p
// The Chinese Remainder Theorem then rebuilds each component modulo
// M = p_1 p_2 p_3:
//   X = { sum_i m_i <m_i^-1 x_i>_p_i } mod M,   m_i = M / p_i
// and values above (M-1)/2 are taken as negative (X - M).
//
// The formulas are the paper's. The hardware form is this design's
// choice: constant multipliers and modulo-p reductions, then a three-term sum
// reduced by at most two subtractions of M. The input word is in residue form
// (0..p-1 per digit), as the array's accumulators deliver it.
//
// Interface: q (qword_t) in; re, im (signed OUT_W bits) out. Purely
// combinational.
module rev_conv
  import gauss_pkg::*;
#(
  parameter int unsigned OUT_W = 21
) (
  input  qword_t                  q,
  output logic signed [OUT_W-1:0] re,
  output logic signed [OUT_W-1:0] im
);

  localparam longint unsigned M = range_m();
  localparam int unsigned     XW = 24;   // holds up to 3*M

  logic [XW-1:0] tre [NMOD];   // m_i * <m_i^-1 re_i>
  logic [XW-1:0] tim [NMOD];

  for (genvar i = 0; i < NMOD; i++) begin : g_mod
    localparam int unsigned     PI   = MODULI[i];
    localparam int unsigned     JI   = jhat(PI);
    localparam int unsigned     H    = modinv(2, PI);                   // 2^-1
    localparam int unsigned     HJ   = (H * modinv(longint'(JI), PI)) % PI;       // 2^-1 j^-1
    localparam longint unsigned MI   = M / longint'(PI);
    localparam int unsigned     MINV = modinv(MI, PI);

    logic [15:0] sre, sim;
    logic [DW-1:0] xre, xim, cre, cim;

    always_comb begin
      sre = 16'(q.z[i]) + 16'(q.zs[i]);
      sim = 16'(q.z[i]) + 16'(PI) - 16'(q.zs[i]);
      xre = DW'((16'(H)  * (sre % 16'(PI))) % 16'(PI));
      xim = DW'((16'(HJ) * (sim % 16'(PI))) % 16'(PI));
      cre = DW'((16'(MINV) * 16'(xre)) % 16'(PI));
      cim = DW'((16'(MINV) * 16'(xim)) % 16'(PI));
      tre[i] = XW'(MI) * XW'(cre);
      tim[i] = XW'(MI) * XW'(cim);
    end
  end

  function automatic logic signed [OUT_W-1:0] crt_sum(input logic [XW-1:0] t [NMOD]);
    logic [XW-1:0] x;
    x = '0;
    for (int i = 0; i < NMOD; i++) x = x + t[i];
    for (int k = 0; k < NMOD - 1; k++) if (x >= XW'(M)) x = x - XW'(M);
    if (x > XW'((M - 1) / 2)) return OUT_W'($signed(x - XW'(M)));
    return OUT_W'($signed(x));
  endfunction

  assign re = crt_sum(tre);
  assign im = crt_sum(tim);

endmodule
