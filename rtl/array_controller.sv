// array_controller: sequences the 2x2 array for one command.
//
// The paper says the array needs very little control. The prototype used
// a commercial microsequencer whose microprogram is not given. This is a
// small hardwired state machine built to meet the paper's cycle counts:
//
//   OP_MATMUL  cmd_len = n (inner dimension), cmd_cnt = number of 2x2 result
//              blocks. Per block, n+6 cycles:
//                FEED  n+1 cycles. Row 0 / column 0 read their FIFOs in
//                      cycles 0..n-1. Row 1 / column 1 read in cycles 1..n.
//                      This makes the sloped data fronts, and idle inputs get
//                      the zero code.
//                DRAIN 3 cycles, for the last operands to reach cell (1,1)'s
//                      accumulator;
//                SHIFT 2 cycles. The accumulators shift east into the east
//                      FIFOs and are cleared behind the shift.
//              So ceil(m/2)*ceil(r/2) blocks take ceil(m/2)*ceil(r/2)*(n+6)
//              cycles, the paper's formula.
//   OP_VMUL    pointwise product. cmd_len = words per lane. Each of the two
//              vector lanes takes one operand pair per cycle, so a length-N
//              product takes ceil(N/2) issue cycles, plus 3 for the pipeline.
//   OP_VADD    adds groups of cmd_cnt consecutive operands per lane. The b
//              operand is forced to 1 (exponent 0). K vectors of length N,
//              stored element-major, take K*N/2 + 3 cycles.
//   OP_VMAC    multiply-accumulates groups of cmd_cnt operand pairs per lane
//              (inner products).
//
// Before each block (or vector command) the controller waits, in WAIT,
// until every FIFO it reads holds enough words and the east FIFOs have room.
// After that no cycle stalls. Results go to the east FIFOs through out_wr.
// op_cycles holds the number of cycles from the first FEED cycle to the last
// cycle of the previous command. Commands use a valid/ready handshake and
// are accepted only when idle. Reset is synchronous, active low.
module array_controller
  import gauss_pkg::*;
#(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned LW    = 16,
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // command
  input  logic          cmd_valid,
  output logic          cmd_ready,
  input  op_e           cmd_op,
  input  logic [LW-1:0] cmd_len,
  input  logic [LW-1:0] cmd_cnt,
  // FIFO levels: in 0,1 = west rows 0,1; in 2,3 = south columns 0,1
  input  logic [CW-1:0] in_count  [4],
  input  logic [CW-1:0] out_count [2],
  input  logic          res_valid [2],
  // array control
  output logic          in_rd  [4],
  output logic          one_s,        // south operands forced to exponent 0
  output logic          vec_mode,
  output logic          shift,
  output logic          first  [2],
  output logic          last   [2],
  output logic          out_wr [2],
  // status
  output logic          busy,
  output logic          waiting,
  output logic          done,
  output logic [31:0]   op_cycles
);

  typedef enum logic [2:0] {S_IDLE, S_WAIT, S_FEED, S_DRAIN, S_SHIFT} state_e;

  state_e        state;
  op_e           op;
  logic [LW-1:0] len, cnt, blk, g;
  logic [LW:0]   t;
  logic [1:0]    d;
  logic          started;
  logic [31:0]   cyc;
  logic          can_go;

  // Are all operands of the next block (or vector command) buffered?
  always_comb begin
    logic [CW:0] need_out;
    need_out = (op == OP_MATMUL) ? (CW+1)'(4) : (CW+1)'(len);   // margin for writes in flight
    can_go = 1'b1;
    for (int k = 0; k < 2; k++) begin
      if (32'(in_count[k]) < 32'(len)) can_go = 1'b0;
      if (op != OP_VADD && 32'(in_count[2+k]) < 32'(len)) can_go = 1'b0;
      if ((CW+1)'(DEPTH) - (CW+1)'(out_count[k]) < need_out) can_go = 1'b0;
    end
  end

  always_comb begin
    logic feed;
    feed      = (state == S_FEED);
    vec_mode  = (state != S_IDLE) && (op != OP_MATMUL);
    shift     = (state == S_SHIFT);
    one_s     = feed && (op == OP_VADD);
    cmd_ready = (state == S_IDLE);
    busy      = (state != S_IDLE);
    waiting   = (state == S_WAIT);
    for (int k = 0; k < 2; k++) begin
      if (op == OP_MATMUL) begin
        // row/column 1 runs one cycle behind row/column 0
        in_rd[k]   = feed && ((k == 0) ? (t < (LW+1)'(len)) : (t >= 1));
        in_rd[2+k] = in_rd[k];
        first[k]   = 1'b0;
        last[k]    = 1'b0;
        out_wr[k]  = shift;
      end else begin
        in_rd[k]   = feed;
        in_rd[2+k] = feed && (op != OP_VADD);
        first[k]   = feed && (g == '0);
        last[k]    = feed && ((g == cnt - 1'b1) || (t == (LW+1)'(len) - 1'b1) || (op == OP_VMUL));
        out_wr[k]  = res_valid[k];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      op        <= OP_MATMUL;
      len       <= '0;
      cnt       <= '0;
      blk       <= '0;
      g         <= '0;
      t         <= '0;
      d         <= '0;
      started   <= 1'b0;
      cyc       <= '0;
      op_cycles <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      if (started) cyc <= cyc + 1;
      unique case (state)
        S_IDLE: if (cmd_valid) begin
          op      <= cmd_op;
          len     <= cmd_len;
          cnt     <= (cmd_op == OP_VMUL) ? LW'(1) : cmd_cnt;
          blk     <= '0;
          started <= 1'b0;
          cyc     <= '0;
          state   <= S_WAIT;
        end
        S_WAIT: if (can_go) begin
          state   <= S_FEED;
          started <= 1'b1;
          t       <= '0;
          g       <= '0;
          if (!started) cyc <= '0;
        end
        S_FEED: begin
          t <= t + 1'b1;
          g <= (g == cnt - 1'b1) ? '0 : g + 1'b1;
          if ((op == OP_MATMUL && t == (LW+1)'(len)) ||
              (op != OP_MATMUL && t == (LW+1)'(len) - 1'b1)) begin
            state <= S_DRAIN;
            d     <= '0;
          end
        end
        S_DRAIN: begin
          d <= d + 1'b1;
          if (d == 2'd2) begin
            if (op == OP_MATMUL) begin
              state <= S_SHIFT;
              d     <= '0;
            end else begin
              state     <= S_IDLE;
              done      <= 1'b1;
              op_cycles <= cyc + 1;
              started   <= 1'b0;
            end
          end
        end
        S_SHIFT: begin
          d <= d + 1'b1;
          if (d == 2'd1) begin
            blk <= blk + 1'b1;
            if (blk + 1'b1 == cnt) begin
              state     <= S_IDLE;
              done      <= 1'b1;
              op_cycles <= cyc + 1;
              started   <= 1'b0;
            end else if (can_go) begin
              state <= S_FEED;
              t     <= '0;
              g     <= '0;
            end else begin
              state <= S_WAIT;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_no_cmd_when_busy: assert property (@(posedge clk) disable iff (!rst_n)
                                       cmd_valid && cmd_ready |=> busy);
  for (genvar k = 0; k < 4; k++) begin : g_chk
    a_rd_has_data: assert property (@(posedge clk) disable iff (!rst_n)
                                    in_rd[k] |-> in_count[k] != '0);
  end

endmodule
