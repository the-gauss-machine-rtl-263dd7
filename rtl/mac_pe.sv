// mac_pe: GEQRNS multiplier-accumulator processing element, one modulus channel.
//
// The structure follows the processing element block diagram of the discrete
// prototype:
//   stage 1  registers on the west (a) and south (b) operand inputs. They
//            also feed the neighbours: a goes on east, b goes on north.
//   stage 2  the product a*b from geqrns_mult (exponent-coded operands,
//            residue out), held in a product register;
//   stage 3  the accumulator register, loaded with acc + product (mod p).
// In array mode the sums build up in place. Asserting `shift` turns each
// row's accumulators into a shift chain: acc <= west_i (a residue) and
// east_o = acc. The results then leave eastwards, and a 0 shifted in at the
// row's west edge clears the accumulators for the next block.
//
// This design adds two tags, first_i and last_i, for vector mode. They travel
// with the west operand through the pipeline. When the product tagged
// `first` reaches the accumulator, it is loaded rather than added, which
// starts a new group. When the product tagged `last` has been added,
// res_valid_o is high for one cycle while acc_o holds the group result.
// In array mode both tags are held at 0. During a shift the operand register
// takes the zero code, so a residue that passes through is never used as an
// operand.
//
// From the paper: the register placement, the multiplier, the accumulation
// in place, the shift-out of results and the VLSI cell's modulus (113) and
// generator (3), which are the defaults here. This design's own choices: how
// the shift works, the accumulator adder (add, then subtract p if needed),
// the vector tags and the reset.
//
// Timing: an operand pair presented in cycle t is in the accumulator at the
// end of cycle t+2 (three register stages). east_o and north_o are the
// stage-1 registers, so a neighbour sees the operand one cycle later.
// Reset (active low, synchronous) clears every register. Operand registers
// reset to the zero code.
module mac_pe #(
  parameter int unsigned P     = 113,
  parameter int unsigned ALPHA = 3,
  parameter int unsigned DW    = 7
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          shift,     // shift accumulators east (acc <= west_i)
  input  logic [DW-1:0] west_i,    // a operand (exponent code), or residue while shifting
  input  logic [DW-1:0] south_i,   // b operand (exponent code)
  input  logic          first_i,   // vector mode: operand starts a group
  input  logic          last_i,    // vector mode: operand ends a group
  output logic [DW-1:0] east_o,    // a passed on, or accumulator while shifting
  output logic [DW-1:0] north_o,   // b passed on
  output logic [DW-1:0] acc_o,     // accumulator
  output logic          res_valid_o
);

  localparam logic [DW-1:0] PMOD = DW'(P);

  logic [DW-1:0] a_r, b_r, prod, prod_r, acc, acc_nxt;
  logic          first1, last1, first2, last2;
  logic [DW:0]   sum;

  geqrns_mult #(.P(P), .ALPHA(ALPHA), .DW(DW)) u_mult (
    .ea  (a_r),
    .eb  (b_r),
    .prod(prod)
  );

  // Modular accumulator adder: one add and one conditional subtract.
  always_comb begin
    sum = (first2 ? '0 : {1'b0, acc}) + {1'b0, prod_r};
    if (sum >= {1'b0, PMOD}) sum = sum - {1'b0, PMOD};
    acc_nxt = shift ? west_i : sum[DW-1:0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_r         <= '1;
      b_r         <= '1;
      first1      <= 1'b0;
      last1       <= 1'b0;
      prod_r      <= '0;
      first2      <= 1'b0;
      last2       <= 1'b0;
      acc         <= '0;
      res_valid_o <= 1'b0;
    end else begin
      a_r         <= shift ? '1 : west_i;   // residues shifted past are not operands
      b_r         <= south_i;
      first1      <= first_i;
      last1       <= last_i;
      prod_r      <= prod;
      first2      <= first1;
      last2       <= last1;
      acc         <= acc_nxt;
      res_valid_o <= last2 && !shift;
    end
  end

  assign east_o  = shift ? acc : a_r;
  assign north_o = b_r;
  assign acc_o   = acc;

endmodule
