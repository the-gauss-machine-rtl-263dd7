// tb_array_controller: checks the controller's cycle-by-cycle schedule on its
// own, with modelled FIFO levels.
//   Matrix mode: for random n and block counts, row/column 0 must read in
//   cycles 0..n-1 of every block, row/column 1 in cycles 1..n, and shift in
//   cycles n+4 and n+5. op_cycles must be blocks*(n+6).
//   Waiting: with empty input FIFOs the controller must sit in WAIT, reading
//   nothing, until the operands arrive.
//   Vector modes: reads, first/last tags, forced unit operand (OP_VADD),
//   result writes following res_valid, and op_cycles = len+3.
module tb_array_controller;
  import gauss_pkg::*;

  localparam int D = 64;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, cmd_ready;
  op_e  cmd_op = OP_MATMUL;
  logic [15:0] cmd_len = '0, cmd_cnt = '0;
  logic [6:0] in_count [4], out_count [2];
  logic res_valid [2];
  logic in_rd [4], first [2], last [2], out_wr [2];
  logic one_s, vec_mode, shift, busy, waiting, done;
  logic [31:0] op_cycles;
  int level [4];

  array_controller #(.DEPTH(D), .LW(16)) dut (.*);

  always #5 clk = ~clk;

  always_comb begin
    for (int k = 0; k < 4; k++) in_count[k] = 7'(level[k]);
    out_count[0] = '0;
    out_count[1] = '0;
  end

  always @(posedge clk)
    for (int k = 0; k < 4; k++) if (in_rd[k]) level[k] <= level[k] - 1;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int expv);
    checks++;
    if (got != expv) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0d exp %0d at %0t", what, got, expv, $time);
    end
  endtask

  task automatic issue(op_e op, int len, int cnt);
    @(negedge clk);
    cmd_op = op; cmd_len = 16'(len); cmd_cnt = 16'(cnt); cmd_valid = 1;
    @(negedge clk);
    cmd_valid = 0;
  endtask

  task automatic matmul(int n, int blocks);
    int t;
    for (int k = 0; k < 4; k++) level[k] = n * blocks;
    issue(OP_MATMUL, n, blocks);
    // WAIT lasts one cycle when the operands are already there
    @(negedge clk);
    for (t = 0; t < blocks * (n + 6); t++) begin
      int u;
      u = t % (n + 6);
      check("in_rd row0", int'(in_rd[0]), int'(u < n));
      check("in_rd col0", int'(in_rd[2]), int'(u < n));
      check("in_rd row1", int'(in_rd[1]), int'(u >= 1 && u <= n));
      check("in_rd col1", int'(in_rd[3]), int'(u >= 1 && u <= n));
      check("shift", int'(shift), int'(u == n + 4 || u == n + 5));
      check("out_wr", int'(out_wr[0]), int'(u == n + 4 || u == n + 5));
      check("vec_mode", int'(vec_mode), 0);
      @(negedge clk);
    end
    check("done/idle", int'(cmd_ready), 1);
    check("op_cycles", int'(op_cycles), blocks * (n + 6));
  endtask

  task automatic vector(op_e op, int len, int g);
    int waits;
    for (int k = 0; k < 4; k++) level[k] = len;
    issue(op, len, g);
    @(negedge clk);
    for (int t = 0; t < len + 3; t++) begin
      int gg;
      gg = (op == OP_VMUL) ? 0 : t % g;
      res_valid[0] = ($urandom_range(1) == 1);
      res_valid[1] = ($urandom_range(1) == 1);
      #1;
      check("v in_rd west", int'(in_rd[0] && in_rd[1]), int'(t < len));
      check("v in_rd south", int'(in_rd[2] || in_rd[3]), int'(t < len && op != OP_VADD));
      check("v one_s", int'(one_s), int'(t < len && op == OP_VADD));
      check("v first", int'(first[0] && first[1]), int'(t < len && gg == 0));
      check("v last", int'(last[0] && last[1]),
            int'(t < len && (op == OP_VMUL || gg == g - 1 || t == len - 1)));
      check("v out_wr", int'(out_wr[1]), int'(res_valid[1]));
      check("v vec_mode", int'(vec_mode), 1);
      @(negedge clk);
    end
    res_valid[0] = 0; res_valid[1] = 0;
    check("v op_cycles", int'(op_cycles), len + 3);
    check("v idle", int'(cmd_ready), 1);
    waits = 0;
  endtask

  initial begin
    int wait_cycles;
    res_valid[0] = 0; res_valid[1] = 0;
    for (int k = 0; k < 4; k++) level[k] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 12; i++) matmul(1 + int'($urandom_range(9)), 1 + int'($urandom_range(4)));
    // waiting for operands
    issue(OP_MATMUL, 4, 1);
    wait_cycles = 0;
    repeat (10) begin
      @(negedge clk);
      if (waiting) wait_cycles++;
      check("no read while waiting", int'(in_rd[0] || in_rd[1] || in_rd[2] || in_rd[3]), 0);
    end
    check("wait cycles", wait_cycles, 10);
    for (int k = 0; k < 4; k++) level[k] = 4;
    @(negedge clk);
    repeat (12) @(negedge clk);
    check("done after wait", int'(cmd_ready), 1);
    for (int k = 0; k < 4; k++) check("all read after wait", level[k], 0);
    // vector modes
    vector(OP_VMUL, 7, 1);
    vector(OP_VADD, 12, 3);
    vector(OP_VMAC, 10, 4);
    vector(OP_VMAC, 9, 9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
