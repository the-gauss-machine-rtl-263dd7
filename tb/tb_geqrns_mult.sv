// tb_geqrns_mult: exhaustive check of the GEQRNS multiplier for all three
// moduli. Every pair of 7-bit exponent codes is applied. The product must
// equal (alpha^ea * alpha^eb) mod p, computed by repeated multiplication. It
// must be 0 whenever either code is >= p-1, the zero operand.
module tb_geqrns_mult;
  import gauss_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [6:0] ea, eb;
  logic [6:0] prod [3];

  geqrns_mult #(.P(113), .ALPHA(3), .DW(7)) u0 (.ea(ea), .eb(eb), .prod(prod[0]));
  geqrns_mult #(.P(109), .ALPHA(6), .DW(7)) u1 (.ea(ea), .eb(eb), .prod(prod[1]));
  geqrns_mult #(.P(101), .ALPHA(2), .DW(7)) u2 (.ea(ea), .eb(eb), .prod(prod[2]));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int zeros = 0;
    for (int i = 0; i < 128; i++) begin
      for (int j = 0; j < 128; j++) begin
        ea = 7'(i);
        eb = 7'(j);
        #1;
        for (int m = 0; m < 3; m++) begin
          int p, expv;
          p = REF_P[m];
          expv = (rexp(i, REF_G[m], p) * rexp(j, REF_G[m], p)) % p;
          if (expv == 0) zeros++;
          checks++;
          if (int'(prod[m]) != expv) begin
            failures++;
            if (failures < 10) $display("FAIL p=%0d ea=%0d eb=%0d got %0d exp %0d", p, i, j, prod[m], expv);
          end
        end
      end
    end
    checks++;
    if (zeros == 0) begin
      failures++;
      $display("FAIL zero operands never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
