// tb_cos_denominator -- self-checking test of the denominator adder:
// the worked sums 105 + 60 = 165 and 35 + 60 = 95, then all pairs of 8-bit
// areas on a coarse grid plus random pairs, against integer addition.
module tb_cos_denominator;
  import cos_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  area_t          ac1, ac2;
  logic [D_W-1:0] d;

  cos_denominator dut (.ac1(ac1), .ac2(ac2), .d(d));

  task automatic apply(int a, int b);
    ac1 = AC_W'(a); ac2 = AC_W'(b);
    @(posedge clk);
    checks++;
    if (int'(d) != a + b) begin
      failures++;
      $display("FAIL %0d + %0d = %0d", a, b, d);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(105, 60);
    apply(35, 60);
    apply(255, 255);
    for (int i = 0; i < 256; i += 15)
      for (int j = 0; j < 256; j += 15) apply(i, j);
    for (int k = 0; k < 1000; k++) apply(int'($urandom_range(0, 255)), int'($urandom_range(0, 255)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
