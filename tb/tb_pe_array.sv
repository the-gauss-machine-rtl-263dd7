// tb_pe_array: one channel (p = 113) of the 2x2 array.
// Array mode: several back-to-back 2x2 block products with random inner
// dimension n. The inputs are driven with the sloped fronts, then three drain
// cycles, then two shift cycles. The four results must come out of the east
// outputs in the order C[r][1], C[r][0], each equal to sum_k A[r][k]*B[k][c]
// mod p. Each block must take n+6 cycles.
// Vector mode: random groups of multiply-accumulate on both lanes. Each
// result strobe must come with the right group sum.
module tb_pe_array;
  import gauss_ref_pkg::*;

  localparam int P = 113, G = 3;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic vec_mode = 0, shift = 0;
  logic [6:0] west_i [2], south_i [2], east_o [2];
  logic first_i [2], last_i [2], res_valid_o [2];

  pe_array #(.P(P), .ALPHA(G), .DW(7)) dut (.*);

  always #5 clk = ~clk;

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

  task automatic idle_inputs();
    for (int k = 0; k < 2; k++) begin
      west_i[k] = 7'(ZC); south_i[k] = 7'(ZC); first_i[k] = 0; last_i[k] = 0;
    end
  endtask

  // one 2x2 block product with inner dimension n
  task automatic run_block(int n);
    int a [2][], b [][2];
    int c [2][2];
    int t0;
    a[0] = new[n]; a[1] = new[n]; b = new[n];
    for (int k = 0; k < n; k++)
      for (int i = 0; i < 2; i++) begin
        a[i][k] = ($urandom_range(5) == 0) ? 0 : int'($urandom_range(P - 1));
        b[k][i] = ($urandom_range(5) == 0) ? 0 : int'($urandom_range(P - 1));
      end
    for (int i = 0; i < 2; i++)
      for (int j = 0; j < 2; j++) begin
        c[i][j] = 0;
        for (int k = 0; k < n; k++) c[i][j] = (c[i][j] + a[i][k] * b[k][j]) % P;
      end
    t0 = $time / 10;
    for (int t = 0; t <= n; t++) begin
      idle_inputs();
      if (t < n) begin
        west_i[0]  = 7'(rlog(a[0][t], G, P));
        south_i[0] = 7'(rlog(b[t][0], G, P));
      end
      if (t >= 1) begin
        west_i[1]  = 7'(rlog(a[1][t-1], G, P));
        south_i[1] = 7'(rlog(b[t-1][1], G, P));
      end
      @(negedge clk);
    end
    idle_inputs();
    repeat (3) @(negedge clk);
    shift = 1;
    west_i[0] = 0; west_i[1] = 0;
    for (int s = 0; s < 2; s++) begin
      #1;
      for (int r = 0; r < 2; r++) check($sformatf("C[%0d][%0d]", r, 1 - s), int'(east_o[r]), c[r][1-s]);
      @(negedge clk);
    end
    shift = 0;
    idle_inputs();
    check("block cycles", $time / 10 - t0, n + 6);
  endtask

  initial begin
    int nres = 0;
    idle_inputs();
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // array mode, back to back
    for (int blk = 0; blk < 20; blk++) run_block(1 + int'($urandom_range(11)));
    // vector mode: groups of gs multiply-accumulates on each lane
    vec_mode = 1;
    for (int rep = 0; rep < 10; rep++) begin
      int gs, ngrp;
      int exp_q [2][$];
      int cnt [2];
      gs   = 1 + int'($urandom_range(4));
      ngrp = 1 + int'($urandom_range(4));
      for (int k = 0; k < 2; k++) cnt[k] = 0;
      fork
        begin
          for (int gi = 0; gi < ngrp; gi++) begin
            int s [2];
            s[0] = 0; s[1] = 0;
            for (int e = 0; e < gs; e++) begin
              for (int k = 0; k < 2; k++) begin
                int x, y;
                x = int'($urandom_range(P - 1));
                y = int'($urandom_range(P - 1));
                s[k] = (s[k] + x * y) % P;
                west_i[k] = 7'(rlog(x, G, P));
                south_i[k] = 7'(rlog(y, G, P));
                first_i[k] = (e == 0);
                last_i[k] = (e == gs - 1);
              end
              @(negedge clk);
            end
            exp_q[0].push_back(s[0]);
            exp_q[1].push_back(s[1]);
          end
          idle_inputs();
          repeat (5) @(negedge clk);
        end
        begin
          forever begin
            @(posedge clk);
            #1;
            for (int k = 0; k < 2; k++)
              if (res_valid_o[k]) begin
                check("vector result", int'(east_o[k]), exp_q[k].size() > 0 ? exp_q[k].pop_front() : -1);
                cnt[k]++;
                nres++;
              end
          end
        end
      join_any
      disable fork;
      for (int k = 0; k < 2; k++) check("vector result count", cnt[k], ngrp);
    end
    checks++;
    if (nres == 0) begin failures++; $display("FAIL no vector results"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
