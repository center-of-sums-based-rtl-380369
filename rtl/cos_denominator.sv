// cos_denominator -- denominator D = AC1 + AC2 of the Center-of-Sums formula.
//
// The original denominator architecture finds the two trapezoid areas with
// the same adder/subtractor/divider/multiplier chain as the numerator and
// adds them. In the merged defuzzifier that chain is shared with the
// numerator, so this unit is the final adder (ADD8 of the merged drawing):
// it takes AC1 and AC2 from the shared area units. D is 9 bits, wide enough
// for the sum of two 8-bit areas. Timing: purely combinational.
module cos_denominator
  import cos_pkg::*;
(
  input  area_t          ac1,
  input  area_t          ac2,
  output logic [D_W-1:0] d
);
  cos_add #(.A_W(AC_W), .B_W(AC_W), .Y_W(D_W)) u_ad8 (.a(ac1), .b(ac2), .y(d));
endmodule
