// cos_defuzzifier -- two-rule Center-of-Sums (COS) defuzzifier.
//
// A Mamdani fuzzy controller with two fired rules produces two clipped
// trapezoidal output sets C1 and C2. The COS method replaces the centroid of
// their union by the area-weighted mean of the individual centres:
//   O = (CC1*AC1 + CC2*AC2) / (AC1 + AC2)
// which needs no integration over the union, only one area and one centre per
// set. The crisp output O is the truncated integer quotient.
//
// Structure (the merged architecture of the original design): the numerator
// unit computes AC1, AC2, CC1, CC2 and N = CC1*AC1 + CC2*AC2; the denominator
// unit adds the same AC1 and AC2 into D; the divider DIV5 forms O = N / D.
//
// Interface: each set is four 4-bit points cKx1..cKx4 (ascending) and a 4-bit
// clipped height hcK on any common scale; num2 is the divisor used for the
// halvings and is tied to 2 in normal use; o is the 16-bit crisp output.
// Port names and widths are those of the original. If both heights are zero
// D is zero and o is all ones (this design's choice).
// Timing: purely combinational, no clock and no reset; o is valid one logic
// delay after the inputs settle.
module cos_defuzzifier
  import cos_pkg::*;
(
  input  logic [X_W-1:0] c1x1,
  input  logic [X_W-1:0] c1x2,
  input  logic [X_W-1:0] c1x3,
  input  logic [X_W-1:0] c1x4,
  input  logic [H_W-1:0] hc1,
  input  logic [X_W-1:0] c2x1,
  input  logic [X_W-1:0] c2x2,
  input  logic [X_W-1:0] c2x3,
  input  logic [X_W-1:0] c2x4,
  input  logic [H_W-1:0] hc2,
  input  logic [X_W-1:0] num2,
  output logic [O_W-1:0] o
);
  trapezoid_t     c1, c2;
  area_t          ac1, ac2;
  centre_t        cc1, cc2;
  logic [N_W-1:0] n;
  logic [D_W-1:0] d;

  always_comb begin
    c1 = '{x1: c1x1, x2: c1x2, x3: c1x3, x4: c1x4, h: hc1};
    c2 = '{x1: c2x1, x2: c2x2, x3: c2x3, x4: c2x4, h: hc2};
  end

  cos_numerator   u_num (.c1(c1), .c2(c2), .num2(num2), .n(n),
                         .ac1(ac1), .ac2(ac2), .cc1(cc1), .cc2(cc2));
  cos_denominator u_den (.ac1(ac1), .ac2(ac2), .d(d));
  cos_div #(.N_W(N_W), .D_W(D_W), .Q_W(O_W)) u_dv5 (.n(n), .d(d), .q(o));
endmodule
