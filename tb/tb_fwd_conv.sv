// tb_fwd_conv: the conversion engine for each of the three moduli, fed every
// pair (a, b) of 8-bit signed integers in a coarse grid, plus random pairs.
// The outputs must be the log codes of z = a + j^ b and z* = a - j^ b
// (mod p), with j^ and the logarithm found by search. Purely combinational.
module tb_fwd_conv;
  import gauss_ref_pkg::*;

  int checks = 0, failures = 0, n_zero = 0;
  logic signed [7:0] re, im;
  logic [6:0] z [3], zs [3];

  fwd_conv #(.P(113), .ALPHA(3), .DW(7), .IN_W(8)) u0 (.re(re), .im(im), .z_log(z[0]), .zs_log(zs[0]));
  fwd_conv #(.P(109), .ALPHA(6), .DW(7), .IN_W(8)) u1 (.re(re), .im(im), .z_log(z[1]), .zs_log(zs[1]));
  fwd_conv #(.P(101), .ALPHA(2), .DW(7), .IN_W(8)) u2 (.re(re), .im(im), .z_log(z[2]), .zs_log(zs[2]));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(int a, int b);
    re = 8'(a);
    im = 8'(b);
    #1;
    for (int m = 0; m < 3; m++) begin
      int ez, ezs;
      ez  = rlog(qrns(longint'(a), longint'(b), m, 0), REF_G[m], REF_P[m]);
      ezs = rlog(qrns(longint'(a), longint'(b), m, 1), REF_G[m], REF_P[m]);
      if (ez == ZC || ezs == ZC) n_zero++;
      checks += 2;
      if (int'(z[m]) != ez || int'(zs[m]) != ezs) begin
        failures++;
        if (failures < 20) $display("FAIL p=%0d a=%0d b=%0d got %0d/%0d exp %0d/%0d",
                                    REF_P[m], a, b, z[m], zs[m], ez, ezs);
      end
    end
  endtask

  initial begin
    for (int a = -128; a < 128; a += 3)
      for (int b = -128; b < 128; b += 5) apply(a, b);
    for (int i = 0; i < 2000; i++) apply(int'($urandom_range(255)) - 128, int'($urandom_range(255)) - 128);
    apply(0, 0);
    apply(-128, -128);
    apply(127, 127);
    checks++;
    if (n_zero == 0) begin failures++; $display("FAIL zero channel never produced"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
