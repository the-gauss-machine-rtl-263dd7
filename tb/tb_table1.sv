// tb_table1: the workloads of the prototype's performance table, run on the
// whole machine at its default parameters. Each one is checked for correct
// results and for its cycle count, and the rate at a 10 MHz clock is printed.
//   2x2, 4x4, 10x10 complex matrix products: ceil(m/2)*ceil(r/2)*(n+6) cycles
//   1000-point complex pointwise product: ceil(N/2) issue cycles + 3
//   1000-point complex pointwise sum of two vectors: K*N/2 + 3 cycles
// Operands are preloaded into the input FIFOs before each command, so the
// counts contain no waiting.
module tb_table1;
  import gauss_pkg::*;
  import gauss_ref_pkg::*;

  int checks = 0, failures = 0;
  int n_block = 0;
  int n_zero = 0, n_neg = 0;

  logic clk = 0, rst_n = 0;
  logic in_wr [4], in_full [4];
  logic signed [7:0] in_re [4], in_im [4];
  logic cmd_valid = 0, cmd_ready;
  op_e  cmd_op = OP_MATMUL;
  logic [15:0] cmd_len = '0, cmd_cnt = '0;
  logic out_rd [2], out_empty [2];
  logic signed [20:0] out_re [2], out_im [2];
  logic [10:0] out_count [2];
  logic busy, waiting, done;
  logic [31:0] op_cycles;

  gauss_machine dut (.*);

  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint expv);
    checks++;
    if (got != expv) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0d exp %0d at %0t", what, got, expv, $time);
    end
  endtask

  // expected outputs per east FIFO
  longint exp_re [2][$], exp_im [2][$];

  task automatic push(int k, int a, int b);
    for (int m = 0; m < 3; m++)
      for (int h = 0; h < 2; h++) if (qrns(longint'(a), longint'(b), m, h) == 0) n_zero++;
    @(negedge clk);
    in_wr[k] = 1; in_re[k] = 8'(a); in_im[k] = 8'(b);
    @(negedge clk);
    in_wr[k] = 0;
  endtask

  task automatic issue(op_e op, int len, int cnt);
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd_op = op; cmd_len = 16'(len); cmd_cnt = 16'(cnt); cmd_valid = 1;
    @(negedge clk);
    cmd_valid = 0;
  endtask

  task automatic wait_done();
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
  endtask

  task automatic drain();
    for (int k = 0; k < 2; k++) begin
      check("result count", longint'(out_count[k]), longint'(exp_re[k].size()));
      while (!out_empty[k]) begin
        longint er, ei;
        er = exp_re[k].size() > 0 ? exp_re[k].pop_front() : 1 << 30;
        ei = exp_im[k].size() > 0 ? exp_im[k].pop_front() : 1 << 30;
        #1;
        check($sformatf("out%0d re", k), longint'(out_re[k]), er);
        check($sformatf("out%0d im", k), longint'(out_im[k]), ei);
        if (out_re[k] < 0) n_neg++;
        @(negedge clk);
        out_rd[k] = 1;
        @(negedge clk);
        out_rd[k] = 0;
      end
    end
  endtask

  function automatic int rv();
    int x;
    x = int'($urandom_range(200)) - 100;
    if ($urandom_range(9) == 0) x = 0;
    return x;
  endfunction

  // C = A*B for an m x n by n x r complex product, padded to even m, r.
  // Writes the operands block by block; preload = write before the command.
  task automatic matmul(int m, int n, int r, bit preload);
    int ar [][], ai [][], br [][], bi [][];
    int mb, rb, blocks;
    mb = (m + 1) / 2; rb = (r + 1) / 2; blocks = mb * rb;
    ar = new[2*mb]; ai = new[2*mb];
    foreach (ar[i]) begin
      ar[i] = new[n]; ai[i] = new[n];
      foreach (ar[i][k]) begin
        ar[i][k] = (i < m) ? rv() : 0;
        ai[i][k] = (i < m) ? rv() : 0;
      end
    end
    br = new[n]; bi = new[n];
    foreach (br[k]) begin
      br[k] = new[2*rb]; bi[k] = new[2*rb];
      foreach (br[k][j]) begin
        br[k][j] = (j < r) ? rv() : 0;
        bi[k][j] = (j < r) ? rv() : 0;
      end
    end
    if (!preload) issue(OP_MATMUL, n, blocks);
    for (int bI = 0; bI < mb; bI++)
      for (int bJ = 0; bJ < rb; bJ++) begin
        for (int k = 0; k < n; k++) begin
          @(negedge clk);
          for (int q = 0; q < 2; q++) begin
            in_wr[q] = 1; in_re[q] = 8'(ar[2*bI+q][k]); in_im[q] = 8'(ai[2*bI+q][k]);
            in_wr[2+q] = 1; in_re[2+q] = 8'(br[k][2*bJ+q]); in_im[2+q] = 8'(bi[k][2*bJ+q]);
            for (int mm = 0; mm < 3; mm++) begin
              if (qrns(longint'(ar[2*bI+q][k]), longint'(ai[2*bI+q][k]), mm, 0) == 0) n_zero++;
              if (qrns(longint'(br[k][2*bJ+q]), longint'(bi[k][2*bJ+q]), mm, 0) == 0) n_zero++;
            end
          end
        end
        @(negedge clk);
        for (int q = 0; q < 4; q++) in_wr[q] = 0;
        // expected: east FIFO q gets C[2bI+q][2bJ+1] then C[2bI+q][2bJ]
        for (int q = 0; q < 2; q++)
          for (int s = 1; s >= 0; s--) begin
            longint cr, ci;
            cr = 0; ci = 0;
            for (int k = 0; k < n; k++) begin
              cr += longint'(ar[2*bI+q][k]) * br[k][2*bJ+s] - longint'(ai[2*bI+q][k]) * bi[k][2*bJ+s];
              ci += longint'(ar[2*bI+q][k]) * bi[k][2*bJ+s] + longint'(ai[2*bI+q][k]) * br[k][2*bJ+s];
            end
            exp_re[q].push_back(cr);
            exp_im[q].push_back(ci);
          end
      end
    if (preload) issue(OP_MATMUL, n, blocks);
    wait_done();
    if (preload) check("matmul cycles", longint'(op_cycles), longint'(blocks * (n + 6)));
    n_block += blocks;
    drain();
  endtask

  // Vector operation on two lanes. Lane k gets the words of x/y with index
  // parity k; op: VMUL (g = 1), VADD (y unused), VMAC.
  task automatic vector(op_e op, int len, int g, int xr [], int xi [], int yr [], int yi []);
    int nw;
    nw = len;   // words per lane
    for (int t = 0; t < nw; t++) begin
      @(negedge clk);
      for (int k = 0; k < 2; k++) begin
        in_wr[k] = 1; in_re[k] = 8'(xr[2*t+k]); in_im[k] = 8'(xi[2*t+k]);
        if (op != OP_VADD) begin
          in_wr[2+k] = 1; in_re[2+k] = 8'(yr[2*t+k]); in_im[2+k] = 8'(yi[2*t+k]);
        end
      end
    end
    @(negedge clk);
    for (int q = 0; q < 4; q++) in_wr[q] = 0;
    issue(op, nw, g);
    wait_done();
    check("vector cycles", longint'(op_cycles), longint'(nw + 3));
  endtask

  task automatic report(string name, longint cyc, longint expc);
    check({name, " cycles"}, cyc, expc);
    $display("%-40s %6d cycles  %8.1f K/s at 10 MHz", name, cyc, 10.0e6 / real'(cyc) / 1000.0);
  endtask

  initial begin
    for (int k = 0; k < 4; k++) begin in_wr[k] = 0; in_re[k] = 0; in_im[k] = 0; end
    out_rd[0] = 0; out_rd[1] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);

    matmul(2, 2, 2, 1);
    report("2x2 complex matrix product", longint'(op_cycles), 8);
    matmul(4, 4, 4, 1);
    report("4x4 complex matrix product", longint'(op_cycles), 40);
    matmul(10, 10, 10, 1);
    report("10x10 complex matrix product", longint'(op_cycles), 400);

    begin
      int xr [], xi [], yr [], yi [];
      xr = new[1000]; xi = new[1000]; yr = new[1000]; yi = new[1000];
      for (int i = 0; i < 1000; i++) begin xr[i] = rv(); xi[i] = rv(); yr[i] = rv(); yi[i] = rv(); end
      for (int t = 0; t < 500; t++)
        for (int k = 0; k < 2; k++) begin
          exp_re[k].push_back(longint'(xr[2*t+k]) * yr[2*t+k] - longint'(xi[2*t+k]) * yi[2*t+k]);
          exp_im[k].push_back(longint'(xr[2*t+k]) * yi[2*t+k] + longint'(xi[2*t+k]) * yr[2*t+k]);
        end
      vector(OP_VMUL, 500, 1, xr, xi, yr, yi);
      report("1000-point complex pointwise product", longint'(op_cycles), 503);
      drain();

      // x + y: element-major, word t of lane k = element 2*(t/2)+k of vector t%2
      begin
        int sr [], si [];
        sr = new[2000]; si = new[2000];
        for (int t = 0; t < 1000; t++)
          for (int k = 0; k < 2; k++) begin
            sr[2*t+k] = (t % 2 == 0) ? xr[2*(t/2)+k] : yr[2*(t/2)+k];
            si[2*t+k] = (t % 2 == 0) ? xi[2*(t/2)+k] : yi[2*(t/2)+k];
          end
        for (int e = 0; e < 500; e++)
          for (int k = 0; k < 2; k++) begin
            exp_re[k].push_back(longint'(xr[2*e+k]) + yr[2*e+k]);
            exp_im[k].push_back(longint'(xi[2*e+k]) + yi[2*e+k]);
          end
        vector(OP_VADD, 1000, 2, sr, si, sr, si);
        report("1000-point complex pointwise sum", longint'(op_cycles), 1003);
        drain();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
