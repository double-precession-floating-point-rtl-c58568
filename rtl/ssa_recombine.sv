// ssa_recombine: final step of the SSA algorithm, carry accumulation.
//
// The inverse transform returns convolution coefficients z_i (each below
// 2^31 here) that are base-R "digits" too large for their place. Walking
// from the least significant coefficient up, each one absorbs the carry from
// below, keeps its value mod R = 2^DIGIT_W and passes floor(value / R)
// upwards (steps 6-9 of the algorithm). The digits, concatenated, are the
// PROD_W-bit product. Purely combinational.
module ssa_recombine
  import ssa_pkg::*;
(
  input  res_t              coef_i [N_PTS],
  output logic [PROD_W-1:0] prod_o
);
  localparam int unsigned FULL_W = N_PTS * DIGIT_W;
  logic [FULL_W-1:0] digits;
  logic [RES_W:0]    acc;
  logic [RES_W:0]    carry;

  always_comb begin
    carry = '0;
    acc   = '0;
    for (int i = 0; i < N_PTS; i++) begin
      acc   = {1'b0, coef_i[i]} + carry;
      digits[i*DIGIT_W +: DIGIT_W] = acc[DIGIT_W-1:0];
      carry = acc >> DIGIT_W;
    end
    prod_o = digits[PROD_W-1:0];
  end
endmodule
