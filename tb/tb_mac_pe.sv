// tb_mac_pe: random cycle-by-cycle check of one processing element (p = 113,
// alpha = 3) against a reference model of its three register stages. Random
// exponent codes go in, about one in eight of them the zero code, together
// with random vector tags and occasional shift cycles. Each cycle the
// testbench checks the passed-on operands, the accumulator, the shift output
// and the result strobe. The model's products come from repeated
// multiplication, not from the RTL tables.
module tb_mac_pe;
  import gauss_ref_pkg::*;

  localparam int P = 113, G = 3;

  int checks = 0, failures = 0;
  int n_shift = 0, n_first = 0, n_valid = 0, n_zero = 0, n_wrap = 0;
  logic clk = 0, rst_n = 0;
  logic shift = 0, first_i = 0, last_i = 0;
  logic [6:0] west_i = 7'h7f, south_i = 7'h7f;
  logic [6:0] east_o, north_o, acc_o;
  logic res_valid_o;

  mac_pe #(.P(P), .ALPHA(G), .DW(7)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model state
  int s1_a = ZC, s1_b = ZC, s2_prod = 0, macc = 0;
  bit s1_f = 0, s1_l = 0, s2_f = 0, s2_l = 0, mrv = 0;

  task automatic check(string what, int got, int expv);
    checks++;
    if (got != expv) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0d exp %0d at %0t", what, got, expv, $time);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      int sum;
      // new inputs
      shift   = ($urandom_range(15) == 0);
      west_i  = shift ? 7'($urandom_range(P - 1)) :
                ($urandom_range(7) == 0) ? 7'h7f : 7'($urandom_range(P - 2));
      south_i = ($urandom_range(7) == 0) ? 7'h7f : 7'($urandom_range(P - 2));
      first_i = ($urandom_range(3) == 0);
      last_i  = ($urandom_range(3) == 0);
      if (west_i == 7'h7f || south_i == 7'h7f) n_zero++;
      @(posedge clk);
      // model update with the values held before the edge
      sum = (s2_f ? 0 : macc) + s2_prod;
      if (!shift && !s2_f && sum >= P) n_wrap++;
      if (sum >= P) sum -= P;
      mrv  = s2_l && !shift;
      macc = shift ? int'(west_i) : sum;
      if (shift) n_shift++;
      if (s2_f && !shift) n_first++;
      if (mrv) n_valid++;
      s2_prod = (rexp(s1_a, G, P) * rexp(s1_b, G, P)) % P;
      s2_f = s1_f;
      s2_l = s1_l;
      s1_a = shift ? ZC : int'(west_i);
      s1_b = int'(south_i);
      s1_f = first_i;
      s1_l = last_i;
      #1;
      check("north_o", int'(north_o), s1_b);
      check("acc_o", int'(acc_o), macc);
      check("res_valid_o", int'(res_valid_o), int'(mrv));
      check("east_o", int'(east_o), shift ? macc : s1_a);
      @(negedge clk);
    end
    checks++;
    if (n_shift == 0 || n_first == 0 || n_valid == 0 || n_zero == 0 || n_wrap == 0) begin
      failures++;
      $display("FAIL a mechanism was not exercised");
    end
    $display("shift=%0d group_load=%0d result=%0d zero_operand=%0d mod_wrap=%0d",
             n_shift, n_first, n_valid, n_zero, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
