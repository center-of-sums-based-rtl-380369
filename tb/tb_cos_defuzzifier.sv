// tb_cos_defuzzifier -- end-to-end test of the complete COS defuzzifier at
// its default sizes.
//
// 1. The three input sets of the original timing diagram, as printed bit
//    patterns, must give the crisp outputs 6, 7 and 6 (models 1, 2 and 3).
// 2. Random ordered trapezoid pairs, with NUM2 = 2 and occasionally other
//    divisors, compared with the integer reference model.
// The design is combinational: every output is checked 1 ns after the inputs
// change, i.e. with no clock cycle of latency. Each mechanism of the datapath
// is counted and must be exercised at least once: a pair sum above 4 bits,
// a truncating and an exact output division, a zero denominator (both
// heights zero), a single active rule (one height zero) and a divisor NUM2
// other than 2.
module tb_cos_defuzzifier;
  import cos_ref_pkg::*;

  int checks = 0, failures = 0;
  int n_wide_sum = 0, n_trunc = 0, n_exact = 0, n_zero_den = 0, n_one_rule = 0, n_num2 = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [3:0]  c1x1, c1x2, c1x3, c1x4, hc1;
  logic [3:0]  c2x1, c2x2, c2x3, c2x4, hc2;
  logic [3:0]  num2;
  logic [15:0] o;

  cos_defuzzifier dut (.*);

  task automatic apply(trap_t a, trap_t b, int d, int exp_o);
    int nn, dd;
    @(posedge clk);
    c1x1 = 4'(a.x1); c1x2 = 4'(a.x2); c1x3 = 4'(a.x3); c1x4 = 4'(a.x4); hc1 = 4'(a.h);
    c2x1 = 4'(b.x1); c2x2 = 4'(b.x2); c2x3 = 4'(b.x3); c2x4 = 4'(b.x4); hc2 = 4'(b.h);
    num2 = 4'(d);
    #1;
    checks++;
    if (int'(o) != exp_o) begin
      failures++;
      $display("FAIL C1=(%0d,%0d,%0d,%0d h%0d) C2=(%0d,%0d,%0d,%0d h%0d) num2=%0d: o=%0d want %0d",
               a.x1, a.x2, a.x3, a.x4, a.h, b.x1, b.x2, b.x3, b.x4, b.h, d, o, exp_o);
    end
    nn = ref_num(a, b, d);
    dd = ref_den(a, b, d);
    if (a.x3 + a.x4 > 15 || b.x3 + b.x4 > 15) n_wide_sum++;
    if (dd == 0) n_zero_den++;
    else if (nn % dd == 0) n_exact++;
    else n_trunc++;
    if ((a.h == 0) != (b.h == 0)) n_one_rule++;
    if (d != 2) n_num2++;
  endtask

  task automatic need(string what, int count);
    checks++;
    $display("mechanism %-28s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    trap_t a, b;
    // Timing diagram, T-state 1: c1 = 0000 0010 0110 1000, c2 = 0110 0111 1101 1110,
    // hc1 = 1010, hc2 = 0101, num2 = 0010 -> o = ...0110.
    a = '{x1: 'b0000, x2: 'b0010, x3: 'b0110, x4: 'b1000, h: 'b1010};
    b = '{x1: 'b0110, x2: 'b0111, x3: 'b1101, x4: 'b1110, h: 'b0101};
    apply(a, b, 'b0010, 'b110);
    // T-state 2 (model 2): hc1 = 0101, hc2 = 1010 -> o = ...0111.
    a = '{x1: 'b0000, x2: 'b0001, x3: 'b0111, x4: 'b1000, h: 'b0101};
    b = '{x1: 'b0110, x2: 'b1000, x3: 'b1100, x4: 'b1110, h: 'b1010};
    apply(a, b, 'b0010, 'b111);
    // T-state 3 (model 3): hc1 = 1111 -> o = ...0110 (1125 / 165).
    a = '{x1: 'b0000, x2: 'b0011, x3: 'b0111, x4: 'b1010, h: 'b1111};
    apply(a, b, 'b0010, 'b110);
    // Both rules inactive.
    a.h = 0; b.h = 0;
    apply(a, b, 2, ref_out(a, b, 2));
    for (int k = 0; k < 5000; k++) begin
      int d;
      a = rand_trap();
      b = rand_trap();
      if (k % 50 == 0) a.h = 0;
      d = (k % 10 == 0) ? int'($urandom_range(1, 15)) : 2;
      apply(a, b, d, ref_out(a, b, d));
    end
    need("pair sum above 4 bits", n_wide_sum);
    need("truncating division", n_trunc);
    need("exact division", n_exact);
    need("zero denominator", n_zero_den);
    need("single active rule", n_one_rule);
    need("NUM2 other than 2", n_num2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
