// nt_log: number-theoretic logarithm table for one prime modulus.
//
// A non-zero residue x of GF(p) is replaced by the exponent e, 0 <= e <= p-2,
// with ALPHA^e = x (mod p). ALPHA must generate GF(p)\{0}. The residue 0 has no
// logarithm and maps to the reserved ZERO_CODE (all ones); so do the unused
// inputs x >= p. That is how the zero exception travels to the multiplier.
//
// Following the paper, this is a 2^DW-entry lookup table (Figure 1's Log()
// boxes). Here it sits in the conversion engine, in front of the array. The
// table contents are computed at elaboration from P and ALPHA.
//
// Interface: x (residue) in, e (exponent code) out. Purely combinational.
module nt_log #(
  parameter int unsigned P     = 113,
  parameter int unsigned ALPHA = 3,
  parameter int unsigned DW    = 7
) (
  input  logic [DW-1:0] x,
  output logic [DW-1:0] e
);

  logic [DW-1:0] rom [2**DW];

  for (genvar i = 0; i < 2**DW; i++) begin : g_rom
    localparam logic [DW-1:0] V = DW'(gauss_pkg::log_entry(P, ALPHA, i, 2**DW - 1));
    assign rom[i] = V;
  end

  assign e = rom[x];

endmodule
