// tb_nt_log: exhaustive check of the number-theoretic logarithm tables of
// all three moduli. For every 7-bit input x the output e must satisfy
// alpha^e = x (mod p) with e <= p-2. For x = 0 and x >= p it must be the zero
// code. Purely combinational, so a time step follows each input.
module tb_nt_log;
  import gauss_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [6:0] x;
  logic [6:0] e [3];

  nt_log #(.P(113), .ALPHA(3), .DW(7)) u0 (.x(x), .e(e[0]));
  nt_log #(.P(109), .ALPHA(6), .DW(7)) u1 (.x(x), .e(e[1]));
  nt_log #(.P(101), .ALPHA(2), .DW(7)) u2 (.x(x), .e(e[2]));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 128; i++) begin
      x = 7'(i);
      #1;
      for (int m = 0; m < 3; m++) begin
        int p, ok;
        p = REF_P[m];
        if (i == 0 || i >= p) ok = (int'(e[m]) == ZC);
        else ok = (int'(e[m]) <= p - 2) && (rpow(REF_G[m], int'(e[m]), p) == i);
        checks++;
        if (!ok) begin
          failures++;
          $display("FAIL p=%0d x=%0d e=%0d", p, i, e[m]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
