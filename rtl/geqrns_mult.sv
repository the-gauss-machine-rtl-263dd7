// geqrns_mult: Galois-enhanced modular multiplier for one prime modulus.
//
// Both operands arrive as exponent codes: ea = log(a), eb = log(b). The
// logarithm tables of Figure 1 sit upstream in the conversion engine. The
// product <ab>_p = ALPHA^((ea+eb) mod (p-1)) is produced by a DW+1-bit adder
// and one 2^(DW+1)-entry table. As the paper describes, that table does
// the mod p-1 correction and the exponentiation together.
//
// Zero handling, which the paper requires but leaves out of Figure 1: an
// operand code >= p-1 (the zero code is all ones) means a zero operand, and
// the product is then 0. The product leaves in ordinary residue form
// (0..p-1), ready for the modular accumulator.
//
// Interface: ea, eb in; prod out. Purely combinational.
module geqrns_mult #(
  parameter int unsigned P     = 113,
  parameter int unsigned ALPHA = 3,
  parameter int unsigned DW    = 7
) (
  input  logic [DW-1:0] ea,
  input  logic [DW-1:0] eb,
  output logic [DW-1:0] prod
);

  logic [DW-1:0] rom [2**(DW+1)];

  for (genvar i = 0; i < 2**(DW+1); i++) begin : g_rom
    localparam logic [DW-1:0] V = DW'(gauss_pkg::exp_entry(P, ALPHA, i));
    assign rom[i] = V;
  end

  logic          zero;
  logic [DW:0]   esum;

  always_comb begin
    zero = (32'(ea) >= P - 1) || (32'(eb) >= P - 1);
    esum = {1'b0, ea} + {1'b0, eb};
    prod = zero ? '0 : rom[esum];
  end

endmodule
