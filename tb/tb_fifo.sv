// tb_fifo: random pushes and pops on a small FIFO (DEPTH = 8), checked
// against a queue model: data order, count, full and empty. Pushes when full
// and pops when empty are never issued, since the FIFO's assertions forbid
// them. Filling it to full and draining it to empty must both happen.
module tb_fifo;
  localparam int W = 12, D = 8;

  int checks = 0, failures = 0, n_full = 0, n_empty = 0;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic full, empty;
  logic [3:0] count;

  fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
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

  initial begin
    logic [W-1:0] q [$];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      int bias;
      bias = (cyc / 200) % 2;   // alternate fill-heavy and drain-heavy phases
      wr_en   = !full && ($urandom_range(3) < (bias ? 3 : 1));
      rd_en   = !empty && ($urandom_range(3) < (bias ? 1 : 3));
      wr_data = W'($urandom);
      if (rd_en) check("rd_data", int'(rd_data), int'(q[0]));
      @(posedge clk);
      if (rd_en) void'(q.pop_front());
      if (wr_en) q.push_back(wr_data);
      #1;
      check("count", int'(count), q.size());
      check("full", int'(full), int'(q.size() == D));
      check("empty", int'(empty), int'(q.size() == 0));
      if (full) n_full++;
      if (empty) n_empty++;
      @(negedge clk);
    end
    checks++;
    if (n_full == 0 || n_empty == 0) begin failures++; $display("FAIL full/empty not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
