// pe_array: one channel (one modulus, z or z*) of the Gauss machine, a 2x2
// mesh of mac_pe cells with unidirectional dataflow.
//
// Cell (r,c) is row r (0 = bottom) and column c (0 = west). In array mode:
//   west_i[r]  feeds row r; operands move east through the cells;
//   south_i[c] feeds column c; operands move north through the cells;
//   each cell accumulates sum_k a[r][k]*b[k][c] in place;
//   with `shift` high the accumulators of a row shift east. east_o[r] gives
//   C[r][1] in the first shift cycle and C[r][0] in the second.
// The caller presents the sloped data fronts: row 1 and column 1 run one
// cycle behind row 0 and column 0.
//
// In vector mode (vec_mode = 1) only the two bottom cells work. This is the
// document's vector subarray. Lane k is cell (0,k). Its a operand comes from
// west_i[k] and its b operand from south_i[k]. Its group result appears on
// east_o[k], with res_valid_o[k] high. The top row gets zero operands. The
// document does not show the vector-mode routing: this wiring, which brings
// row 1's west input to cell (0,1), is this design's own.
//
// Timing: see mac_pe. Combinational paths run only from vec_mode/shift to the
// output muxes.
module pe_array #(
  parameter int unsigned P     = 113,
  parameter int unsigned ALPHA = 3,
  parameter int unsigned DW    = 7
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          vec_mode,
  input  logic          shift,
  input  logic [DW-1:0] west_i  [2],
  input  logic [DW-1:0] south_i [2],
  input  logic          first_i [2],   // vector lane tags
  input  logic          last_i  [2],
  output logic [DW-1:0] east_o  [2],
  output logic          res_valid_o [2]
);

  localparam logic [DW-1:0] ZC = '1;

  logic [DW-1:0] w   [2][2];   // west input of cell [r][c]
  logic [DW-1:0] s   [2][2];   // south input
  logic [DW-1:0] e   [2][2];   // east output
  logic [DW-1:0] n   [2][2];   // north output
  logic [DW-1:0] acc [2][2];
  logic          fi  [2][2];
  logic          li  [2][2];
  logic          rv  [2][2];

  always_comb begin
    w[0][0] = west_i[0];
    w[0][1] = vec_mode ? west_i[1] : e[0][0];
    w[1][0] = vec_mode ? ZC        : west_i[1];
    w[1][1] = e[1][0];
    s[0][0] = south_i[0];
    s[0][1] = south_i[1];
    s[1][0] = n[0][0];
    s[1][1] = n[0][1];
    for (int c = 0; c < 2; c++) begin
      fi[0][c] = vec_mode && first_i[c];
      li[0][c] = vec_mode && last_i[c];
      fi[1][c] = 1'b0;
      li[1][c] = 1'b0;
    end
    for (int r = 0; r < 2; r++) begin
      east_o[r]      = vec_mode ? acc[0][r] : e[r][1];
      res_valid_o[r] = vec_mode && rv[0][r];
    end
  end

  for (genvar r = 0; r < 2; r++) begin : g_row
    for (genvar c = 0; c < 2; c++) begin : g_col
      mac_pe #(.P(P), .ALPHA(ALPHA), .DW(DW)) u_pe (
        .clk        (clk),
        .rst_n      (rst_n),
        .shift      (shift),
        .west_i     (w[r][c]),
        .south_i    (s[r][c]),
        .first_i    (fi[r][c]),
        .last_i     (li[r][c]),
        .east_o     (e[r][c]),
        .north_o    (n[r][c]),
        .acc_o      (acc[r][c]),
        .res_valid_o(rv[r][c])
      );
    end
  end

endmodule
