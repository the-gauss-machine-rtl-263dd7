// spare_modulus_crt: CRT reconstruction for a machine that carries one
// spare modulus array (defect tolerance "case II").
//
// The machine carries NM = 5 moduli, one more than it needs. If one single-
// modulus array is defective, it is discarded: its residue is ignored, and
// the integer is rebuilt from the other four by the Chinese Remainder
// Theorem,
//   X = { sum_{i != d} m_i <m_i^-1 x_i>_p_i } mod M_d,
//   M_d = prod_{i != d} p_i,   m_i = M_d / p_i,
// and values above (M_d-1)/2 are taken as negative. So the results stay
// correct whatever the discarded array outputs, as long as |X| fits the
// smallest four-modulus range (89*97*101*109 = 95,041,897, about 26.5 bits).
//
// From the paper: discarding all processors of one modulus, with four
// working moduli plus one spare. This design's own choices: the moduli
// 113, 109, 101, 97, 89 (the largest 7-bit primes of the form 4k+1, so the
// QRNS works on all of them), a real-valued (per component) reconstruction,
// one constant-coefficient CRT per choice of discarded modulus, and a mux on
// `drop`. drop = NM-1 is the normal setting: the spare (89) is left out.
//
// Interface: x[i] residues (0..p_i-1) in; drop (index of the discarded
// modulus, 0..NM-1) in; y (signed OUT_W bits) out. Purely combinational.
module spare_modulus_crt #(
  parameter int unsigned DW    = 7,
  parameter int unsigned OUT_W = 28,
  localparam int unsigned NM   = 5,
  localparam int unsigned IW   = $clog2(NM)
) (
  input  logic [DW-1:0]            x [NM],
  input  logic [IW-1:0]            drop,
  output logic signed [OUT_W-1:0]  y
);

  localparam int unsigned SP [NM] = '{113, 109, 101, 97, 89};
  localparam int unsigned XW = 36;

  function automatic longint unsigned range_without(int unsigned d);
    longint unsigned m;
    m = 1;
    for (int unsigned i = 0; i < NM; i++) if (i != d) m = m * longint'(SP[i]);
    return m;
  endfunction

  function automatic int unsigned inv_mod(longint unsigned a, int unsigned p);
    longint unsigned am;
    am = a % longint'(p);
    for (int unsigned v = 1; v < p; v++)
      if ((am * longint'(v)) % longint'(p) == 1) return v;
    return 0;
  endfunction

  logic signed [OUT_W-1:0] yd [NM];   // result with modulus d discarded

  for (genvar d = 0; d < NM; d++) begin : g_drop
    localparam longint unsigned MD = range_without(d);
    logic [XW-1:0] t [NM];
    logic [XW-1:0] sum;

    for (genvar i = 0; i < NM; i++) begin : g_term
      localparam int unsigned     PI   = SP[i];
      localparam longint unsigned MI   = MD / longint'(PI);
      localparam int unsigned     MINV = inv_mod(MI, PI);
      if (i == d) begin : g_skip
        assign t[i] = '0;
      end else begin : g_use
        logic [15:0] c;
        assign c    = (16'(MINV) * 16'(x[i])) % 16'(PI);
        assign t[i] = XW'(MI) * XW'(c);
      end
    end

    always_comb begin
      sum = '0;
      for (int i = 0; i < NM; i++) sum = sum + t[i];
      for (int k = 0; k < NM - 2; k++) if (sum >= XW'(MD)) sum = sum - XW'(MD);
      if (sum > XW'((MD - 1) / 2)) yd[d] = OUT_W'($signed(sum - XW'(MD)));
      else                         yd[d] = OUT_W'($signed(sum));
    end
  end

  always_comb begin
    y = yd[NM-1];
    for (int d = 0; d < NM; d++) if (32'(drop) == d) y = yd[d];
  end

endmodule
