// gauss_machine: the Gauss machine, a 2x2 SIMD systolic array of GEQRNS
// multiplier-accumulators working on complex integers.
//
// Each complex operand a + jb is coded as six 7-bit digits. For each of three
// primes p = 4k+1 (113, 109, 101) there is a z and a z* channel, and in QRNS
// form a complex product is just one modular product per channel. The six
// channels are independent copies of the same 2x2 array (pe_array). They run
// in lockstep under one controller, like the single-channel cards of the
// prototype.
//
// Data path:
//   host -> in_re/in_im (signed IN_W bits) -> fwd_conv (residues, QRNS,
//   log form) -> input FIFO (west row 0/1, south column 0/1) -> six pe_array
//   channels -> east FIFO 0/1 (residue form) -> rev_conv (inverse QRNS + CRT)
//   -> out_re/out_im (signed OUT_W bits).
// In array mode (OP_MATMUL) the array computes 2x2 blocks of a complex
// matrix product, n+6 cycles per block. In vector mode (OP_VMUL, OP_VADD,
// OP_VMAC) the two bottom cells act as a two-lane vector processor. See
// array_controller for the command fields and the data order.
//
// Host side: in_wr[k] pushes one complex operand into input FIFO k
// (0,1 = west rows 0,1; 2,3 = south columns 0,1). out_rd[k] pops east
// FIFO k, whose head is always shown, already converted, on out_re/out_im[k].
// Results are exact as long as each component stays within
// +-(M-1)/2 = +-622008, M = 113*109*101.
//
// From the paper: the 2x2 mesh, the FIFOs around it, the three 7-bit
// GEQRNS moduli with z/z* channels, the conversion formulas, the array and
// vector modes and their cycle counts. This design's own choices: the
// moduli 109 and 101, the FIFO depth, the input width, the vector-mode
// routing and the host-side ports, which stand in for the host interface
// processor.
module gauss_machine
  import gauss_pkg::*;
#(
  parameter int unsigned DEPTH = 1024,   // words per FIFO
  parameter int unsigned IN_W  = 8,      // input component width (signed)
  parameter int unsigned OUT_W = 21,     // output component width (signed)
  parameter int unsigned LW    = 16,     // command length field width
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // operand input, one port per input FIFO
  input  logic                    in_wr    [4],
  input  logic signed [IN_W-1:0]  in_re    [4],
  input  logic signed [IN_W-1:0]  in_im    [4],
  output logic                    in_full  [4],
  // command
  input  logic                    cmd_valid,
  output logic                    cmd_ready,
  input  op_e                     cmd_op,
  input  logic [LW-1:0]           cmd_len,
  input  logic [LW-1:0]           cmd_cnt,
  // result output, one port per east FIFO
  input  logic                    out_rd    [2],
  output logic signed [OUT_W-1:0] out_re    [2],
  output logic signed [OUT_W-1:0] out_im    [2],
  output logic                    out_empty [2],
  output logic [CW-1:0]           out_count [2],
  // status
  output logic                    busy,
  output logic                    waiting,
  output logic                    done,
  output logic [31:0]             op_cycles
);

  // ---------------------------------------------------------------- input side
  qword_t        in_word  [4];
  qword_t        in_head  [4];
  logic [CW-1:0] in_count [4];
  logic          in_rd    [4];

  for (genvar k = 0; k < 4; k++) begin : g_in
    for (genvar m = 0; m < NMOD; m++) begin : g_conv
      fwd_conv #(.P(MODULI[m]), .ALPHA(ALPHAS[m]), .DW(DW), .IN_W(IN_W)) u_fwd (
        .re    (in_re[k]),
        .im    (in_im[k]),
        .z_log (in_word[k].z[m]),
        .zs_log(in_word[k].zs[m])
      );
    end

    fifo #(.WIDTH($bits(qword_t)), .DEPTH(DEPTH)) u_in_fifo (
      .clk    (clk),
      .rst_n  (rst_n),
      .wr_en  (in_wr[k]),
      .wr_data(in_word[k]),
      .rd_en  (in_rd[k]),
      .rd_data(in_head[k]),
      .full   (in_full[k]),
      .empty  (),
      .count  (in_count[k])
    );
  end

  // ---------------------------------------------------------------- controller
  logic vec_mode, shift, one_s;
  logic first [2], last [2], out_wr [2];
  logic res_valid [2];

  array_controller #(.DEPTH(DEPTH), .LW(LW)) u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .cmd_valid(cmd_valid),
    .cmd_ready(cmd_ready),
    .cmd_op   (cmd_op),
    .cmd_len  (cmd_len),
    .cmd_cnt  (cmd_cnt),
    .in_count (in_count),
    .out_count(out_count),
    .res_valid(res_valid),
    .in_rd    (in_rd),
    .one_s    (one_s),
    .vec_mode (vec_mode),
    .shift    (shift),
    .first    (first),
    .last     (last),
    .out_wr   (out_wr),
    .busy     (busy),
    .waiting  (waiting),
    .done     (done),
    .op_cycles(op_cycles)
  );

  // Operand selection at the array edge: FIFO head when read, otherwise the
  // zero code; residue 0 shifted in while the accumulators shift out;
  // exponent 0 (the value 1) on the south inputs for vector addition.
  qword_t west_w [2], south_w [2];

  always_comb begin
    for (int k = 0; k < 2; k++) begin
      if (shift)           west_w[k] = '0;
      else if (in_rd[k])   west_w[k] = in_head[k];
      else                 west_w[k] = {NCH{ZERO_CODE}};
      if (one_s)           south_w[k] = '0;
      else if (in_rd[2+k]) south_w[k] = in_head[2+k];
      else                 south_w[k] = {NCH{ZERO_CODE}};
    end
  end

  // ---------------------------------------------------------------- channels
  qword_t east_w [2];
  logic   rv_ch  [NCH][2];

  for (genvar m = 0; m < NMOD; m++) begin : g_mod
    for (genvar h = 0; h < 2; h++) begin : g_half   // 0: z channel, 1: z* channel
      digit_t wi [2], si [2], eo [2];
      logic   rv [2];

      always_comb begin
        for (int k = 0; k < 2; k++) begin
          wi[k] = (h == 0) ? west_w[k].z[m]  : west_w[k].zs[m];
          si[k] = (h == 0) ? south_w[k].z[m] : south_w[k].zs[m];
        end
      end

      pe_array #(.P(MODULI[m]), .ALPHA(ALPHAS[m]), .DW(DW)) u_array (
        .clk        (clk),
        .rst_n      (rst_n),
        .vec_mode   (vec_mode),
        .shift      (shift),
        .west_i     (wi),
        .south_i    (si),
        .first_i    (first),
        .last_i     (last),
        .east_o     (eo),
        .res_valid_o(rv)
      );

      for (genvar k = 0; k < 2; k++) begin : g_out
        if (h == 0) begin : g_z
          assign east_w[k].z[m] = eo[k];
        end else begin : g_zs
          assign east_w[k].zs[m] = eo[k];
        end
        assign rv_ch[2*m+h][k] = rv[k];
      end
    end
  end

  // All channels run in lockstep; channel 0 provides the valid strobes.
  assign res_valid = rv_ch[0];

  // ---------------------------------------------------------------- output side
  for (genvar k = 0; k < 2; k++) begin : g_outq
    qword_t out_head;

    fifo #(.WIDTH($bits(qword_t)), .DEPTH(DEPTH)) u_out_fifo (
      .clk    (clk),
      .rst_n  (rst_n),
      .wr_en  (out_wr[k]),
      .wr_data(east_w[k]),
      .rd_en  (out_rd[k]),
      .rd_data(out_head),
      .full   (),
      .empty  (out_empty[k]),
      .count  (out_count[k])
    );

    rev_conv #(.OUT_W(OUT_W)) u_rev (
      .q (out_head),
      .re(out_re[k]),
      .im(out_im[k])
    );
  end

  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
                               rv_ch[NCH-1][0] == rv_ch[0][0]);

endmodule
