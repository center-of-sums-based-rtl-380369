// cos_mul -- unsigned combinational multiplier, the MT unit of the defuzzifier.
//
// y = a * b truncated to Y_W bits. Used for the area AC = HC * VC (4 x 4 -> 8
// bits) and for TC = CC * AC (4 x 8 -> 16 bits). On an FPGA each instance maps
// onto one hard multiplier block. Only the function comes from the original
// architecture. Timing: purely combinational.
module cos_mul #(
  parameter int unsigned A_W = 4,
  parameter int unsigned B_W = 4,
  parameter int unsigned Y_W = 8
) (
  input  logic [A_W-1:0] a,
  input  logic [B_W-1:0] b,
  output logic [Y_W-1:0] y
);
  localparam int unsigned P_W = A_W + B_W;

  logic [P_W-1:0] prod;

  always_comb begin
    prod = P_W'(a) * P_W'(b);
    y    = Y_W'(prod);
  end
endmodule
