// tb_spare_modulus_crt: CRT with one discarded modulus out of five. For
// every choice of the discarded modulus, random signed integers inside the
// four-modulus range are turned into residues; the discarded residue is
// then replaced by garbage (any 7-bit value) on most vectors to model a
// dead array. The output must equal the integer. Range ends (+-(M-1)/2 of
// the smallest range), zero and small values are covered too.
module tb_spare_modulus_crt;

  localparam int SP [5] = '{113, 109, 101, 97, 89};
  localparam longint MIN_RANGE = 64'd89 * 97 * 101 * 109;

  int checks = 0, failures = 0, n_garbage = 0;
  int n_drop [5];
  logic [6:0] x [5];
  logic [2:0] drop;
  logic signed [27:0] y;

  spare_modulus_crt #(.DW(7), .OUT_W(28)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int res(longint v, int p);
    longint r;
    r = v % p;
    if (r < 0) r += p;
    return int'(r);
  endfunction

  task automatic try(longint v, int d, bit garbage);
    drop = 3'(d);
    for (int i = 0; i < 5; i++) x[i] = 7'(res(v, SP[i]));
    if (garbage) begin
      x[d] = 7'($urandom_range(127));
      n_garbage++;
    end
    n_drop[d]++;
    #1;
    checks++;
    if (longint'(y) != v) begin
      failures++;
      if (failures < 20) $display("FAIL drop=%0d v=%0d got %0d", d, v, y);
    end
  endtask

  initial begin
    longint half;
    half = (MIN_RANGE - 1) / 2;
    for (int d = 0; d < 5; d++) n_drop[d] = 0;
    for (int d = 0; d < 5; d++) begin
      try(0, d, 1);
      try(1, d, 1);
      try(-1, d, 0);
      try(half, d, 1);
      try(-half, d, 1);
      for (int k = 0; k < 400; k++) begin
        longint v;
        v = longint'({$urandom, $urandom}) % (2 * half + 1) - half;
        if (v < -half) v += 2 * half + 1;
        try(v, d, k % 4 != 0);
      end
    end
    for (int d = 0; d < 5; d++) begin
      checks++;
      if (n_drop[d] == 0) begin failures++; $display("FAIL drop %0d unused", d); end
    end
    checks++;
    if (n_garbage == 0) begin failures++; $display("FAIL no garbage residues"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
