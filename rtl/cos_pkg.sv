// cos_pkg -- shared bus widths of the Center-of-Sums (COS) defuzzifier.
//
// The defuzzifier takes two trapezoidal output membership functions C1 and C2,
// each given by four 4-bit points X1..X4 and a 4-bit clipped height, and
// returns the crisp value O = (CC1*AC1 + CC2*AC2) / (AC1 + AC2).
//
// Widths that follow the original architecture drawings: 4-bit inputs, 8-bit
// areas AC, 16-bit area-times-centre products TC and a 16-bit output.
// Design choices of this implementation: the pair sums X3+X4 and X1+X2 and
// their difference are one bit wider (5 bits) than the 4 bits drawn, so that
// sums such as 10 + 7 = 17 are held exactly; the denominator D = AC1 + AC2 is
// 9 bits so it cannot overflow.
package cos_pkg;

  localparam int unsigned X_W  = 4;          // trapezoid point
  localparam int unsigned H_W  = 4;          // clipped height
  localparam int unsigned XS_W = X_W + 1;    // X3+X4, X1+X2 and L1+L2
  localparam int unsigned VC_W = X_W;        // (L1+L2)/NUM2
  localparam int unsigned CC_W = X_W;        // centre of a trapezoid
  localparam int unsigned AC_W = H_W + VC_W; // area, 8 bits
  localparam int unsigned TC_W = 16;         // centre * area
  localparam int unsigned N_W  = 16;         // numerator TC1 + TC2
  localparam int unsigned D_W  = AC_W + 1;   // denominator AC1 + AC2
  localparam int unsigned O_W  = 16;         // crisp output

  typedef logic [X_W-1:0]  point_t;
  typedef logic [H_W-1:0]  height_t;
  typedef logic [AC_W-1:0] area_t;
  typedef logic [CC_W-1:0] centre_t;

  // One trapezoidal consequent: points in ascending order and clipped height.
  typedef struct packed {
    point_t  x1;
    point_t  x2;
    point_t  x3;
    point_t  x4;
    height_t h;
  } trapezoid_t;

endpackage
