// cos_numerator -- numerator N = CC1*AC1 + CC2*AC2 of the Center-of-Sums
// formula.
//
// Two cos_area_center units find the area AC and centre CC of consequents C1
// and C2; the multipliers MT2 and MT4 form TC1 = CC1*AC1 and TC2 = CC2*AC2
// (16 bits each, as drawn) and ADD7 adds them. This is the numerator
// architecture of the original design. The areas AC1 and AC2 are also brought
// out, because the merged defuzzifier feeds its denominator adder from the
// same area units instead of building them twice; the centres are brought
// out for observation. Timing: purely combinational.
module cos_numerator
  import cos_pkg::*;
(
  input  trapezoid_t     c1,
  input  trapezoid_t     c2,
  input  logic [X_W-1:0] num2,
  output logic [N_W-1:0] n,
  output area_t          ac1,
  output area_t          ac2,
  output centre_t        cc1,
  output centre_t        cc2
);
  logic [VC_W-1:0] vc1, vc2;
  logic [TC_W-1:0] tc1, tc2;

  cos_area_center u_c1 (.tz(c1), .num2(num2), .ac(ac1), .cc(cc1), .vc(vc1));
  cos_area_center u_c2 (.tz(c2), .num2(num2), .ac(ac2), .cc(cc2), .vc(vc2));

  cos_mul #(.A_W(CC_W), .B_W(AC_W), .Y_W(TC_W)) u_tt2 (.a(cc1), .b(ac1), .y(tc1));
  cos_mul #(.A_W(CC_W), .B_W(AC_W), .Y_W(TC_W)) u_tt4 (.a(cc2), .b(ac2), .y(tc2));
  cos_add #(.A_W(TC_W), .B_W(TC_W), .Y_W(N_W))  u_ad7 (.a(tc1), .b(tc2), .y(n));
endmodule
