// cos_sub -- unsigned combinational subtractor, the SUB unit of the defuzzifier.
//
// y = a - b modulo 2^W. The defuzzifier uses it for L1+L2 = (X3+X4) - (X1+X2)
// and for the base length X4 - X1. With the points of a trapezoid in
// ascending order the difference is never negative. Only the function comes
// from the original architecture. Timing: purely combinational.
module cos_sub #(
  parameter int unsigned W = 5
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);
  always_comb y = a - b;
endmodule
