// tb_cos_numerator -- self-checking test of the numerator unit.
// Worked models: model 3 gives N = 525 + 600 = 1125, model 2 gives
// N = 140 + 600 = 740. Then random ordered trapezoid pairs against the
// integer reference N = CC1*AC1 + CC2*AC2, with the shared areas checked too.
module tb_cos_numerator;
  import cos_pkg::*;
  import cos_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  trapezoid_t     c1, c2;
  logic [X_W-1:0] num2;
  logic [N_W-1:0] n;
  area_t          ac1, ac2;
  centre_t        cc1, cc2;

  cos_numerator dut (.c1(c1), .c2(c2), .num2(num2), .n(n),
                     .ac1(ac1), .ac2(ac2), .cc1(cc1), .cc2(cc2));

  function automatic trapezoid_t pack(trap_t t);
    return '{x1: 4'(t.x1), x2: 4'(t.x2), x3: 4'(t.x3), x4: 4'(t.x4), h: 4'(t.h)};
  endfunction

  task automatic apply(trap_t a, trap_t b, int exp_n);
    c1 = pack(a); c2 = pack(b); num2 = 4'd2;
    @(posedge clk);
    checks += 5;
    if (int'(n) != exp_n) begin
      failures++;
      $display("FAIL N: got %0d want %0d", n, exp_n);
    end
    if (int'(ac1) != ref_area(a, 2)) begin failures++; $display("FAIL AC1 %0d", ac1); end
    if (int'(ac2) != ref_area(b, 2)) begin failures++; $display("FAIL AC2 %0d", ac2); end
    if (int'(cc1) != ref_centre(a, 2)) begin failures++; $display("FAIL CC1 %0d", cc1); end
    if (int'(cc2) != ref_centre(b, 2)) begin failures++; $display("FAIL CC2 %0d", cc2); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    trap_t a, b;
    a = '{x1: 0, x2: 3, x3: 7, x4: 10, h: 15};
    b = '{x1: 6, x2: 8, x3: 12, x4: 14, h: 10};
    apply(a, b, 1125);
    a = '{x1: 0, x2: 1, x3: 7, x4: 8, h: 5};
    apply(a, b, 740);
    for (int k = 0; k < 2000; k++) begin
      a = rand_trap();
      b = rand_trap();
      apply(a, b, ref_num(a, b, 2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
