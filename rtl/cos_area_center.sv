// cos_area_center -- area and centre of one clipped trapezoidal consequent.
//
// A consequent Ck is a trapezoid with feet X1, X4 and shoulders X2, X3 on the
// output axis (X1 <= X2 <= X3 <= X4), clipped by the inference step to the
// height H. This unit computes, exactly as the original architecture does,
//   VC = ((X3 + X4) - (X1 + X2)) / NUM2      = (L1 + L2) / 2
//   AC = H * VC                              trapezoid area
//   CC = (X4 - X1) / NUM2 + X1               midpoint of the base
// where L1 = X4 - X1 and L2 = X3 - X2 are the two parallel sides. NUM2 is an
// input that carries the constant 2 in normal use. Each operation is its own
// ADD, SUB, DIV or MT unit, as drawn in the original block diagram (for C1:
// ADD1, ADD2, SUB1, DIV1, MT1 for the area; SUB2, DIV2, ADD3 for the centre).
//
// Design choices of this implementation: the pair sums and L1+L2 are 5 bits
// wide (the drawing shows 4, which cannot hold e.g. 10 + 7); VC is 4 bits so
// that AC is the 8 bits of the drawing, which is exact for NUM2 >= 2.
// CC is the base midpoint, the centre of a symmetric trapezoid.
// Timing: purely combinational.
module cos_area_center
  import cos_pkg::*;
(
  input  trapezoid_t      tz,    // points x1..x4 and clipped height h
  input  logic [X_W-1:0]  num2,  // divisor constant, 2
  output area_t           ac,    // H * VC
  output centre_t         cc,    // (X4 - X1)/NUM2 + X1
  output logic [VC_W-1:0] vc     // (L1 + L2)/NUM2
);
  logic [XS_W-1:0] x34, x12, lsum;
  logic [X_W-1:0]  base, half;

  // Area path: ADD1, ADD2, SUB1, DIV1, MT1.
  cos_add #(.A_W(X_W), .B_W(X_W), .Y_W(XS_W)) u_add_x34 (.a(tz.x4), .b(tz.x3), .y(x34));
  cos_add #(.A_W(X_W), .B_W(X_W), .Y_W(XS_W)) u_add_x12 (.a(tz.x1), .b(tz.x2), .y(x12));
  cos_sub #(.W(XS_W))                         u_sub_lsum (.a(x34), .b(x12), .y(lsum));
  cos_div #(.N_W(XS_W), .D_W(X_W), .Q_W(VC_W)) u_div_vc (.n(lsum), .d(num2), .q(vc));
  cos_mul #(.A_W(H_W), .B_W(VC_W), .Y_W(AC_W)) u_mul_ac (.a(tz.h), .b(vc), .y(ac));

  // Centre path: SUB2, DIV2, ADD3.
  cos_sub #(.W(X_W))                           u_sub_base (.a(tz.x4), .b(tz.x1), .y(base));
  cos_div #(.N_W(X_W), .D_W(X_W), .Q_W(X_W))   u_div_half (.n(base), .d(num2), .q(half));
  cos_add #(.A_W(X_W), .B_W(X_W), .Y_W(CC_W))  u_add_cc   (.a(half), .b(tz.x1), .y(cc));
endmodule
