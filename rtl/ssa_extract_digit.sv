// ssa_extract_digit: operand register and digit extraction of the SSA
// multiplier. It captures an OP_W-bit operand and presents it as the digit
// vector that the Schonhage-Strassen transform works on.
//
// load_i captures operand_i at the clock edge (active-low asynchronous reset
// clears it). From the register, digit i is bits [i*DIGIT_W +: DIGIT_W]
// (base R = 2^DIGIT_W, least significant digit first), widened to a residue.
// Only the lower N_PTS/2 digits carry operand bits; the upper half is zero
// padding, which makes the cyclic convolution of the transform equal to the
// ordinary (acyclic) product, as the source paper describes. The digits are valid
// from the cycle after load_i. The register-then-extract order and the zero
// padding follow the source; the 14-bit digit width is this design's choice.
module ssa_extract_digit
  import ssa_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            load_i,
  input  logic [OP_W-1:0] operand_i,
  output logic [OP_W-1:0] operand_o,
  output res_t            digits_o [N_PTS]
);
  localparam int unsigned PAD_W = (N_PTS / 2) * DIGIT_W;
  logic [OP_W-1:0]  op_q;
  logic [PAD_W-1:0] padded;

  initial assert (PAD_W >= OP_W) else $error("digits do not cover the operand");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      op_q <= '0;
    else if (load_i) op_q <= operand_i;
  end

  assign operand_o = op_q;

  always_comb begin
    padded = PAD_W'(op_q);
    for (int i = 0; i < N_PTS; i++) begin
      if (i < N_PTS / 2) digits_o[i] = res_t'(padded[i*DIGIT_W +: DIGIT_W]);
      else               digits_o[i] = '0;
    end
  end
endmodule
