// tb_rev_conv: reverse conversion of random complex integers across the whole
// dynamic range +-(M-1)/2, M = 113*109*101, plus the range edges and 0. The
// testbench forms the six QRNS residues itself. The converter must return the
// original real and imaginary parts. Purely combinational.
module tb_rev_conv;
  import gauss_ref_pkg::*;

  localparam int HALF = (113 * 109 * 101 - 1) / 2;

  int checks = 0, failures = 0, n_neg = 0;
  logic [41:0] q;
  logic signed [20:0] re, im;

  rev_conv #(.OUT_W(21)) dut (.q(q), .re(re), .im(im));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(int a, int b);
    q = enc_res(longint'(a), longint'(b));
    #1;
    if (a < 0) n_neg++;
    checks += 2;
    if (int'(re) != a || int'(im) != b) begin
      failures++;
      if (failures < 20) $display("FAIL a=%0d b=%0d got %0d %0d", a, b, re, im);
    end
  endtask

  initial begin
    apply(0, 0);
    apply(HALF, -HALF);
    apply(-HALF, HALF);
    apply(1, -1);
    for (int i = 0; i < 5000; i++)
      apply(int'($urandom_range(2 * HALF)) - HALF, int'($urandom_range(2 * HALF)) - HALF);
    checks++;
    if (n_neg == 0) begin failures++; $display("FAIL no negative values"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
