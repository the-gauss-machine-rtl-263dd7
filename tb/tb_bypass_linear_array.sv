// tb_bypass_linear_array: the linear array with a spare cell (4 working + 1
// spare, p = 113). For every choice of the switched-out cell it computes
// random vector-matrix products c_j = sum_k a_k b_kj (mod p) and checks the
// shifted-out results and the cycle count (n + N_WORK + 2 feed and drain
// cycles, then N_WORK shift cycles). To model a real defect, the outputs of
// the switched-out cell are forced to garbage for some of the runs. The
// results must not change.
module tb_bypass_linear_array;
  import gauss_ref_pkg::*;

  localparam int P = 113, G = 3, NW = 4;

  int checks = 0, failures = 0, n_forced = 0;
  int n_used [NW+1];
  logic clk = 0, rst_n = 0, shift = 0;
  logic [2:0] bypass_idx = 3'(NW);
  logic [6:0] west_i = 7'h7f, east_o;
  logic [6:0] south_i [NW];

  bypass_linear_array #(.P(P), .ALPHA(G), .DW(7), .N_WORK(NW)) dut (.*);

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
      if (failures < 20) $display("FAIL %s got %0d exp %0d (bypass %0d) at %0t", what, got, expv, bypass_idx, $time);
    end
  endtask

  task automatic row_product(int n);
    int a [], b [][NW], c [NW];
    int t0;
    a = new[n]; b = new[n];
    for (int k = 0; k < n; k++) begin
      a[k] = int'($urandom_range(P - 1));
      for (int j = 0; j < NW; j++) b[k][j] = int'($urandom_range(P - 1));
    end
    for (int j = 0; j < NW; j++) begin
      c[j] = 0;
      for (int k = 0; k < n; k++) c[j] = (c[j] + a[k] * b[k][j]) % P;
    end
    t0 = $time / 10;
    for (int t = 0; t < n + NW - 1; t++) begin
      west_i = (t < n) ? 7'(rlog(a[t], G, P)) : 7'(ZC);
      for (int j = 0; j < NW; j++)
        south_i[j] = (t - j >= 0 && t - j < n) ? 7'(rlog(b[t-j][j], G, P)) : 7'(ZC);
      @(negedge clk);
    end
    west_i = 7'(ZC);
    for (int j = 0; j < NW; j++) south_i[j] = 7'(ZC);
    repeat (3) @(negedge clk);
    shift = 1;
    west_i = 0;
    for (int s = 0; s < NW; s++) begin
      #1;
      check($sformatf("c[%0d]", NW - 1 - s), int'(east_o), c[NW-1-s]);
      @(negedge clk);
    end
    shift = 0;
    west_i = 7'(ZC);
    check("cycles", $time / 10 - t0, n + NW + 2 + NW);
  endtask

  initial begin
    for (int j = 0; j < NW; j++) south_i[j] = 7'(ZC);
    for (int i = 0; i <= NW; i++) n_used[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int rep = 0; rep < 30; rep++) begin
      bypass_idx = 3'(rep % (NW + 1));
      // reconfiguration: a cell that rejoins the chain may hold an old sum,
      // so zeros are shifted through every cell first
      shift = 1;
      west_i = 0;
      repeat (NW + 1) @(negedge clk);
      shift = 0;
      west_i = 7'(ZC);
      // garbage on the switched-out cell for the second half of the runs
      if (rep >= 15) begin
        n_forced++;
        case (bypass_idx)
          3'd0: force dut.g_pe[0].u_pe.east_o = 7'h2a;
          3'd1: force dut.g_pe[1].u_pe.east_o = 7'h2a;
          3'd2: force dut.g_pe[2].u_pe.east_o = 7'h2a;
          3'd3: force dut.g_pe[3].u_pe.east_o = 7'h2a;
          default: force dut.g_pe[4].u_pe.east_o = 7'h2a;
        endcase
      end
      n_used[bypass_idx]++;
      row_product(1 + int'($urandom_range(8)));
      release dut.g_pe[0].u_pe.east_o;
      release dut.g_pe[1].u_pe.east_o;
      release dut.g_pe[2].u_pe.east_o;
      release dut.g_pe[3].u_pe.east_o;
      release dut.g_pe[4].u_pe.east_o;
    end
    for (int i = 0; i <= NW; i++) begin
      checks++;
      if (n_used[i] == 0) begin failures++; $display("FAIL bypass %0d never used", i); end
    end
    checks++;
    if (n_forced == 0) begin failures++; $display("FAIL defect never modelled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
