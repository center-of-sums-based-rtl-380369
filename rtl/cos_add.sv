// cos_add -- unsigned combinational adder, the ADD unit of the defuzzifier.
//
// y = a + b, zero-extended to the output width and truncated to it. The
// defuzzifier uses it for the point-pair sums X3+X4 and X1+X2, for the centre
// offset (X4-X1)/2 + X1, for the numerator TC1+TC2 and for the denominator
// AC1+AC2. Only the function (a box labelled ADD) comes from the original
// architecture; the widths are parameters set per instance.
// Timing: purely combinational, no clock.
module cos_add #(
  parameter int unsigned A_W = 4,
  parameter int unsigned B_W = 4,
  parameter int unsigned Y_W = 5
) (
  input  logic [A_W-1:0] a,
  input  logic [B_W-1:0] b,
  output logic [Y_W-1:0] y
);
  localparam int unsigned S_W = ((A_W > B_W) ? A_W : B_W) + 1;

  logic [S_W-1:0] sum;

  always_comb begin
    sum = S_W'(a) + S_W'(b);
    y   = Y_W'(sum);
  end
endmodule
