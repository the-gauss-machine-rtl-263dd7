// gauss_top: the Gauss machine together with the two defect-tolerance
// schemes.
//
// This wrapper holds:
//   u_gm   gauss_machine: the 2x2 complex GEQRNS systolic array with its
//          converters, FIFOs and controller. Its ports are passed through
//          unchanged.
//   u_la   bypass_linear_array: case I, a linear array of N_WORK working
//          GEQRNS cells plus one spare for p = 113, where any one cell can
//          be switched out (la_* ports).
//   u_crt  spare_modulus_crt: case II, a five-modulus CRT that rebuilds
//          the result from four moduli, discarding the array of the modulus
//          named by sc_drop (sc_* ports).
// The three parts share only the clock and reset.
//
// From the paper: the machine itself and the two schemes of its defect
// tolerance study. The paper gives the schemes only as yield estimates for
// larger linear and mesh arrays, not as part of the 2x2 prototype. So this
// design's own choice is to build them as separate blocks beside the
// machine, not inside its data path, with N_WORK = 4 (a length used in the
// yield tables).
//
// Timing: see gauss_machine, bypass_linear_array and spare_modulus_crt.
module gauss_top
  import gauss_pkg::*;
#(
  parameter int unsigned DEPTH  = 1024,
  parameter int unsigned IN_W   = 8,
  parameter int unsigned OUT_W  = 21,
  parameter int unsigned LW     = 16,
  parameter int unsigned N_WORK = 4,
  parameter int unsigned SC_W   = 28,
  localparam int unsigned CW    = $clog2(DEPTH + 1),
  localparam int unsigned LAW   = $clog2(N_WORK + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // Gauss machine
  input  logic                    in_wr    [4],
  input  logic signed [IN_W-1:0]  in_re    [4],
  input  logic signed [IN_W-1:0]  in_im    [4],
  output logic                    in_full  [4],
  input  logic                    cmd_valid,
  output logic                    cmd_ready,
  input  op_e                     cmd_op,
  input  logic [LW-1:0]           cmd_len,
  input  logic [LW-1:0]           cmd_cnt,
  input  logic                    out_rd    [2],
  output logic signed [OUT_W-1:0] out_re    [2],
  output logic signed [OUT_W-1:0] out_im    [2],
  output logic                    out_empty [2],
  output logic [CW-1:0]           out_count [2],
  output logic                    busy,
  output logic                    waiting,
  output logic                    done,
  output logic [31:0]             op_cycles,
  // case I: linear array with a spare cell (p = 113)
  input  logic [LAW-1:0]          la_bypass_idx,
  input  logic                    la_shift,
  input  logic [DW-1:0]           la_west_i,
  input  logic [DW-1:0]           la_south_i [N_WORK],
  output logic [DW-1:0]           la_east_o,
  // case II: CRT with a spare modulus
  input  logic [DW-1:0]           sc_x [5],
  input  logic [2:0]              sc_drop,
  output logic signed [SC_W-1:0]  sc_y
);

  gauss_machine #(.DEPTH(DEPTH), .IN_W(IN_W), .OUT_W(OUT_W), .LW(LW)) u_gm (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_wr    (in_wr),
    .in_re    (in_re),
    .in_im    (in_im),
    .in_full  (in_full),
    .cmd_valid(cmd_valid),
    .cmd_ready(cmd_ready),
    .cmd_op   (cmd_op),
    .cmd_len  (cmd_len),
    .cmd_cnt  (cmd_cnt),
    .out_rd   (out_rd),
    .out_re   (out_re),
    .out_im   (out_im),
    .out_empty(out_empty),
    .out_count(out_count),
    .busy     (busy),
    .waiting  (waiting),
    .done     (done),
    .op_cycles(op_cycles)
  );

  bypass_linear_array #(.P(MODULI[0]), .ALPHA(ALPHAS[0]), .DW(DW), .N_WORK(N_WORK)) u_la (
    .clk       (clk),
    .rst_n     (rst_n),
    .bypass_idx(la_bypass_idx),
    .shift     (la_shift),
    .west_i    (la_west_i),
    .south_i   (la_south_i),
    .east_o    (la_east_o)
  );

  spare_modulus_crt #(.DW(DW), .OUT_W(SC_W)) u_crt (
    .x   (sc_x),
    .drop(sc_drop),
    .y   (sc_y)
  );

endmodule
