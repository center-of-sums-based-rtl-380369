// tb_cos_area_center -- self-checking test of the area/centre unit.
// Checks the two consequents of the worked model 3 (C1: 0,3,7,10 height 15 ->
// area 105, centre 5; C2: 6,8,12,14 height 10 -> area 60, centre 10), then
// random ordered trapezoids with NUM2 = 2 and with other divisors, against
// the integer reference model.
module tb_cos_area_center;
  import cos_pkg::*;
  import cos_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  trapezoid_t      tz;
  logic [X_W-1:0]  num2;
  area_t           ac;
  centre_t         cc;
  logic [VC_W-1:0] vc;

  cos_area_center dut (.tz(tz), .num2(num2), .ac(ac), .cc(cc), .vc(vc));

  task automatic apply(trap_t t, int d, int exp_ac, int exp_cc);
    tz = '{x1: 4'(t.x1), x2: 4'(t.x2), x3: 4'(t.x3), x4: 4'(t.x4), h: 4'(t.h)};
    num2 = 4'(d);
    @(posedge clk);
    checks += 3;
    if (int'(ac) != exp_ac) begin
      failures++;
      $display("FAIL area %0d,%0d,%0d,%0d h=%0d /%0d: got %0d want %0d",
               t.x1, t.x2, t.x3, t.x4, t.h, d, ac, exp_ac);
    end
    if (int'(cc) != exp_cc) begin
      failures++;
      $display("FAIL centre %0d,%0d,%0d,%0d /%0d: got %0d want %0d",
               t.x1, t.x2, t.x3, t.x4, d, cc, exp_cc);
    end
    if (int'(vc) != ref_vc(t, d)) begin
      failures++;
      $display("FAIL vc: got %0d want %0d", vc, ref_vc(t, d));
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
    trap_t t;
    t = '{x1: 0, x2: 3, x3: 7, x4: 10, h: 15};
    apply(t, 2, 105, 5);
    t = '{x1: 6, x2: 8, x3: 12, x4: 14, h: 10};
    apply(t, 2, 60, 10);
    // Widest trapezoid: L1 + L2 = 30 needs the 5-bit pair sums.
    t = '{x1: 0, x2: 0, x3: 15, x4: 15, h: 15};
    apply(t, 2, 225, 7);
    for (int k = 0; k < 3000; k++) begin
      int d;
      t = rand_trap();
      d = (k % 4 == 0) ? int'($urandom_range(2, 15)) : 2;
      apply(t, d, ref_area(t, d), ref_centre(t, d));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
