// cos_div -- unsigned combinational restoring divider, the DIV unit of the
// defuzzifier.
//
// q = floor(n / d), low Q_W bits. The quotient is truncated, as the crisp
// output of the COS method is (1125/165 gives 6, 740/95 gives 7). The array
// has one row per dividend bit, from the most significant down: the partial
// remainder is shifted left by one, the next dividend bit enters at the
// bottom, and if the remainder is not less than d, d is subtracted and the
// quotient bit is 1. A zero divisor makes every row subtract, so q is all
// ones; that choice is this design's, the original says nothing about it.
// Only the function comes from the original architecture; the restoring array
// is the simplest structure that computes it.
// Timing: purely combinational, N_W subtract-and-select rows deep.
module cos_div #(
  parameter int unsigned N_W = 16,
  parameter int unsigned D_W = 9,
  parameter int unsigned Q_W = 16
) (
  input  logic [N_W-1:0] n,
  input  logic [D_W-1:0] d,
  output logic [Q_W-1:0] q
);
  // The partial remainder stays below d, so D_W bits hold it; one more bit
  // holds it after the shift.
  logic [D_W:0]   rem;
  logic [N_W-1:0] quo;

  always_comb begin
    rem = '0;
    quo = '0;
    for (int i = N_W - 1; i >= 0; i--) begin
      rem = {rem[D_W-1:0], n[i]};
      if (rem >= {1'b0, d}) begin
        rem    = rem - {1'b0, d};
        quo[i] = 1'b1;
      end
    end
    q = Q_W'(quo);
  end
endmodule
