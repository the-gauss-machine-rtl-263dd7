// bypass_linear_array: a linear systolic array of GEQRNS multiplier-
// accumulators with one spare cell. Any one cell can be switched out of the
// chain (defect tolerance "case I").
//
// There are N_WORK+1 physical mac_pe cells in a row. The a operands enter at
// the west end and move east one cell per cycle. Logical cell j takes its b
// operands from south_i[j] and accumulates c_j = sum_k a_k * b_kj mod p, like
// one row of the 2x2 array. bypass_idx names the physical cell that is
// switched out. Its west input is wired straight through to the next cell,
// its south input gets the zero code, and the cells after it take the next
// lower logical index. So the N_WORK working cells behave exactly like an
// N_WORK-cell array with no spare: the same operand skew (column j one cycle
// behind column j-1) and the same shift-out, c_{N_WORK-1} first. With no
// defect, bypass_idx = N_WORK switches out the spare at the east end.
//
// From the paper: the linear array of processors with one defective
// processor switched out, and one spare to cover it (a length of 4 working
// cells plus a spare is one of its yield examples). This design's own
// choices: the bypass as a combinational pass-through (so timing does not
// depend on which cell is out), the use of the mesh row's dataflow for the
// linear array, and bypass_idx as a static input.
//
// Timing: as in mac_pe, operands presented in cycle t reach the accumulator
// of logical cell 0 at the end of cycle t+2. While shift is high, east_o
// shows the east-most working accumulator and the chain moves one cell per
// cycle. bypass_idx must be held steady while the array works. A cell that
// rejoins the chain may still hold an old sum: after changing bypass_idx,
// shift zeros in for N_WORK+1 cycles (or reset) before the next product.
module bypass_linear_array #(
  parameter int unsigned P      = 113,
  parameter int unsigned ALPHA  = 3,
  parameter int unsigned DW     = 7,
  parameter int unsigned N_WORK = 4,
  localparam int unsigned N_PHYS = N_WORK + 1,
  localparam int unsigned IW     = $clog2(N_PHYS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [IW-1:0] bypass_idx,           // physical cell switched out
  input  logic          shift,
  input  logic [DW-1:0] west_i,               // a operands (exponent code), or residue while shifting
  input  logic [DW-1:0] south_i [N_WORK],     // b operands of logical cells
  output logic [DW-1:0] east_o                // result stream
);

  localparam logic [DW-1:0] ZC = '1;

  logic [DW-1:0] w [N_PHYS];      // west input of physical cell i
  logic [DW-1:0] e [N_PHYS];      // east output of physical cell i
  logic [DW-1:0] s [N_PHYS];      // south input of physical cell i
  logic [DW-1:0] chain_out;

  // Chain with the switched-out cell replaced by a wire.
  always_comb begin
    w[0] = west_i;
    for (int i = 1; i < N_PHYS; i++)
      w[i] = (32'(bypass_idx) == i - 1) ? w[i-1] : e[i-1];
    chain_out = (32'(bypass_idx) == N_PHYS - 1) ? w[N_PHYS-1] : e[N_PHYS-1];
  end

  // South inputs: cells before the switched-out one keep their index, cells
  // after it take the next lower one.
  for (genvar i = 0; i < N_PHYS; i++) begin : g_south
    logic [DW-1:0] own, prev;
    if (i < N_WORK) begin : g_own
      assign own = south_i[i];
    end else begin : g_no_own
      assign own = ZC;
    end
    if (i > 0) begin : g_prev
      assign prev = south_i[i-1];
    end else begin : g_no_prev
      assign prev = ZC;
    end
    assign s[i] = (32'(bypass_idx) == i) ? ZC :
                  (32'(bypass_idx) > i)  ? own : prev;
  end

  assign east_o = chain_out;

  for (genvar i = 0; i < N_PHYS; i++) begin : g_pe
    mac_pe #(.P(P), .ALPHA(ALPHA), .DW(DW)) u_pe (
      .clk        (clk),
      .rst_n      (rst_n),
      .shift      (shift),
      .west_i     (w[i]),
      .south_i    (s[i]),
      .first_i    (1'b0),
      .last_i     (1'b0),
      .east_o     (e[i]),
      .north_o    (),
      .acc_o      (),
      .res_valid_o()
    );
  end

  a_idx_range: assert property (@(posedge clk) disable iff (!rst_n) 32'(bypass_idx) < N_PHYS);

endmodule
