// tb_gauss_top: end-to-end test of the top level (the machine and its two
// defect-tolerance blocks) at default parameters. Complex integers go in and come out; the reference results are
// computed in plain integer arithmetic.
//   1. 4x4 complex matrix product from n = 7 (4 blocks), operands preloaded:
//      results and a cycle count of ceil(m/2)*ceil(r/2)*(n+6).
//   2. Odd-sized product (3x5 times 5x3, zero padded), issued before its
//      operands are written, so the controller must wait.
//   3. Pointwise product of two length-9 vectors: ceil(9/2)+3 cycles.
//   4. Sum of K = 3 vectors of length 6 (vector addition): K*N/2+3 cycles.
//   5. Inner product of two length-8 vectors (two lane partial sums), and
//      a 6x5 matrix-vector product as grouped inner products (level 2).
//   6. Case I: vector-matrix products on the 4+1 cell linear array with
//      each cell switched out in turn, the switched-out cell's output
//      forced to garbage.
//   7. Case II: five-modulus CRT with each modulus discarded in turn and
//      its residue replaced by garbage.
// Each mechanism (matrix blocks, shift-out, waiting, the three vector
// operations, zero operands, negative results, bypass settings, discarded
// moduli) is counted, and one that
// never happens counts as a failure.
module tb_gauss_top;
  import gauss_pkg::*;
  import gauss_ref_pkg::*;

  int checks = 0, failures = 0;
  int n_block = 0, n_shift = 0, n_wait = 0, n_vmul = 0, n_vadd = 0, n_vmac = 0;
  int n_zero = 0, n_neg = 0, n_matvec = 0, n_bypass = 0, n_forced = 0, n_drop = 0;
  int bypass_seen [5];
  int drop_seen [5];

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

  logic [2:0] la_bypass_idx = 3'd4;
  logic       la_shift = 0;
  logic [6:0] la_west_i = 7'h7f, la_east_o;
  logic [6:0] la_south_i [4];
  logic [6:0] sc_x [5];
  logic [2:0] sc_drop = 3'd4;
  logic signed [27:0] sc_y;

  localparam int SC_P [5] = '{113, 109, 101, 97, 89};

  gauss_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (dut.u_gm.u_ctrl.shift) n_shift++;
    if (waiting) n_wait++;
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

  // Case I: one vector-matrix product c_j = sum_k a_k b_kj (mod 113) on the
  // linear array, skewed feed, then shift-out (c_3 first).
  task automatic la_product(int n);
    int a [], b [][4], c [4];
    a = new[n]; b = new[n];
    for (int k = 0; k < n; k++) begin
      a[k] = int'($urandom_range(112));
      for (int j = 0; j < 4; j++) b[k][j] = int'($urandom_range(112));
    end
    for (int j = 0; j < 4; j++) begin
      c[j] = 0;
      for (int k = 0; k < n; k++) c[j] = (c[j] + a[k] * b[k][j]) % 113;
    end
    for (int t = 0; t < n + 3; t++) begin
      la_west_i = (t < n) ? 7'(rlog(a[t], 3, 113)) : 7'(ZC);
      for (int j = 0; j < 4; j++)
        la_south_i[j] = (t - j >= 0 && t - j < n) ? 7'(rlog(b[t-j][j], 3, 113)) : 7'(ZC);
      @(negedge clk);
    end
    la_west_i = 7'(ZC);
    for (int j = 0; j < 4; j++) la_south_i[j] = 7'(ZC);
    repeat (3) @(negedge clk);
    la_shift = 1;
    la_west_i = 0;
    for (int s = 0; s < 4; s++) begin
      #1;
      check($sformatf("linear c[%0d]", 3 - s), longint'(la_east_o), longint'(c[3-s]));
      @(negedge clk);
    end
    la_shift = 0;
    la_west_i = 7'(ZC);
  endtask

  initial begin
    for (int j = 0; j < 4; j++) la_south_i[j] = 7'(ZC);
    for (int i = 0; i < 5; i++) begin sc_x[i] = 0; bypass_seen[i] = 0; drop_seen[i] = 0; end
    for (int k = 0; k < 4; k++) begin in_wr[k] = 0; in_re[k] = 0; in_im[k] = 0; end
    out_rd[0] = 0; out_rd[1] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);

    // 1. 4x4 product, n = 7
    matmul(4, 7, 4, 1);
    // 2. odd sizes, command first (waits for operands)
    matmul(3, 5, 3, 0);

    // 3. pointwise product, N = 9 (lane 1 padded with a zero element)
    begin
      int xr [], xi [], yr [], yi [];
      int nn, nw;
      nn = 9; nw = (nn + 1) / 2;
      xr = new[2*nw]; xi = new[2*nw]; yr = new[2*nw]; yi = new[2*nw];
      for (int i = 0; i < 2*nw; i++) begin
        xr[i] = (i < nn) ? rv() : 0; xi[i] = (i < nn) ? rv() : 0;
        yr[i] = (i < nn) ? rv() : 0; yi[i] = (i < nn) ? rv() : 0;
      end
      for (int t = 0; t < nw; t++)
        for (int k = 0; k < 2; k++) begin
          exp_re[k].push_back(longint'(xr[2*t+k]) * yr[2*t+k] - longint'(xi[2*t+k]) * yi[2*t+k]);
          exp_im[k].push_back(longint'(xr[2*t+k]) * yi[2*t+k] + longint'(xi[2*t+k]) * yr[2*t+k]);
        end
      vector(OP_VMUL, nw, 1, xr, xi, yr, yi);
      n_vmul++;
      drain();
    end

    // 4. sum of K = 3 vectors of length 6, element-major
    begin
      int kk, nn;
      int vr [][], vi [][];
      int xr [], xi [];
      kk = 3; nn = 6;
      vr = new[kk]; vi = new[kk];
      foreach (vr[v]) begin
        vr[v] = new[nn]; vi[v] = new[nn];
        foreach (vr[v][e]) begin vr[v][e] = rv(); vi[v][e] = rv(); end
      end
      // word t of lane k is element 2*(t / kk) + k of vector t % kk
      xr = new[kk*nn]; xi = new[kk*nn];
      for (int t = 0; t < kk*nn/2; t++)
        for (int k = 0; k < 2; k++) begin
          xr[2*t+k] = vr[t % kk][2*(t / kk) + k];
          xi[2*t+k] = vi[t % kk][2*(t / kk) + k];
        end
      for (int e2 = 0; e2 < nn/2; e2++)
        for (int k = 0; k < 2; k++) begin
          longint sr, si;
          sr = 0; si = 0;
          for (int v = 0; v < kk; v++) begin sr += vr[v][2*e2+k]; si += vi[v][2*e2+k]; end
          exp_re[k].push_back(sr);
          exp_im[k].push_back(si);
        end
      vector(OP_VADD, kk*nn/2, kk, xr, xi, xr, xi);
      n_vadd++;
      drain();
    end

    // 5. inner product of length 8
    begin
      int xr [], xi [], yr [], yi [];
      longint pr [2], pi [2];
      xr = new[8]; xi = new[8]; yr = new[8]; yi = new[8];
      for (int i = 0; i < 8; i++) begin xr[i] = rv(); xi[i] = rv(); yr[i] = rv(); yi[i] = rv(); end
      for (int k = 0; k < 2; k++) begin
        pr[k] = 0; pi[k] = 0;
        for (int t = 0; t < 4; t++) begin
          pr[k] += longint'(xr[2*t+k]) * yr[2*t+k] - longint'(xi[2*t+k]) * yi[2*t+k];
          pi[k] += longint'(xr[2*t+k]) * yi[2*t+k] + longint'(xi[2*t+k]) * yr[2*t+k];
        end
        exp_re[k].push_back(pr[k]);
        exp_im[k].push_back(pi[k]);
      end
      vector(OP_VMAC, 4, 4, xr, xi, yr, yi);
      n_vmac++;
      drain();
    end

    // 5b. level 2: matrix-vector product y = A v, A 6x5, as grouped inner
    // products: lane k takes rows 2q+k, one group of 5 words per row
    begin
      int ar [6][5], ai [6][5], vr [5], vi [5];
      int xr [], xi [], yr [], yi [];
      xr = new[30]; xi = new[30]; yr = new[30]; yi = new[30];
      for (int i = 0; i < 5; i++) begin vr[i] = rv(); vi[i] = rv(); end
      for (int r = 0; r < 6; r++) for (int i = 0; i < 5; i++) begin ar[r][i] = rv(); ai[r][i] = rv(); end
      for (int q = 0; q < 3; q++)
        for (int i = 0; i < 5; i++)
          for (int k = 0; k < 2; k++) begin
            xr[2*(5*q+i)+k] = ar[2*q+k][i]; xi[2*(5*q+i)+k] = ai[2*q+k][i];
            yr[2*(5*q+i)+k] = vr[i];        yi[2*(5*q+i)+k] = vi[i];
          end
      for (int q = 0; q < 3; q++)
        for (int k = 0; k < 2; k++) begin
          longint sr, si;
          sr = 0; si = 0;
          for (int i = 0; i < 5; i++) begin
            sr += longint'(ar[2*q+k][i]) * vr[i] - longint'(ai[2*q+k][i]) * vi[i];
            si += longint'(ar[2*q+k][i]) * vi[i] + longint'(ai[2*q+k][i]) * vr[i];
          end
          exp_re[k].push_back(sr);
          exp_im[k].push_back(si);
        end
      vector(OP_VMAC, 15, 5, xr, xi, yr, yi);
      n_vmac++;
      n_matvec++;
      drain();
    end

    // 6. case I: each cell switched out in turn
    for (int rep = 0; rep < 10; rep++) begin
      la_bypass_idx = 3'(rep % 5);
      la_shift = 1;
      la_west_i = 0;
      repeat (5) @(negedge clk);
      la_shift = 0;
      la_west_i = 7'(ZC);
      if (rep >= 5) begin
        n_forced++;
        case (la_bypass_idx)
          3'd0: force dut.u_la.g_pe[0].u_pe.east_o = 7'h55;
          3'd1: force dut.u_la.g_pe[1].u_pe.east_o = 7'h55;
          3'd2: force dut.u_la.g_pe[2].u_pe.east_o = 7'h55;
          3'd3: force dut.u_la.g_pe[3].u_pe.east_o = 7'h55;
          default: force dut.u_la.g_pe[4].u_pe.east_o = 7'h55;
        endcase
      end
      la_product(3 + rep);
      bypass_seen[la_bypass_idx]++;
      n_bypass++;
      release dut.u_la.g_pe[0].u_pe.east_o;
      release dut.u_la.g_pe[1].u_pe.east_o;
      release dut.u_la.g_pe[2].u_pe.east_o;
      release dut.u_la.g_pe[3].u_pe.east_o;
      release dut.u_la.g_pe[4].u_pe.east_o;
    end

    // 7. case II: each modulus discarded in turn, garbage on its residue
    for (int rep = 0; rep < 100; rep++) begin
      longint v, r;
      int d;
      d = rep % 5;
      v = longint'($urandom_range(95000000)) - 47500000;
      sc_drop = 3'(d);
      for (int i = 0; i < 5; i++) begin
        r = v % SC_P[i];
        if (r < 0) r += SC_P[i];
        sc_x[i] = 7'(r);
      end
      sc_x[d] = 7'($urandom_range(127));
      #1;
      check("spare crt", longint'(sc_y), v);
      drop_seen[d]++;
      n_drop++;
      @(negedge clk);
    end
    for (int i = 0; i < 5; i++)
      if (bypass_seen[i] == 0 || drop_seen[i] == 0) begin
        failures++;
        $display("FAIL bypass or drop setting %0d not exercised", i);
      end

    $display("matvec=%0d bypass_runs=%0d forced_defects=%0d dropped_moduli=%0d", n_matvec, n_bypass, n_forced, n_drop);
    $display("blocks=%0d shift_cycles=%0d wait_cycles=%0d vmul=%0d vadd=%0d vmac=%0d zero_digits=%0d negative=%0d",
             n_block, n_shift, n_wait, n_vmul, n_vadd, n_vmac, n_zero, n_neg);
    checks++;
    if (n_block == 0 || n_shift == 0 || n_wait < 5 || n_vmul == 0 || n_vadd == 0 ||
        n_vmac == 0 || n_zero == 0 || n_neg == 0 || n_bypass == 0 || n_forced == 0 || n_matvec == 0 ||
        n_drop == 0) begin
      failures++;
      $display("FAIL a mechanism was not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
