// fermat_modmul: element-wise product of two transform points,
// c = a * b mod (2^FN + 1) (step 2-3 of the SSA algorithm; the "mod" block).
//
// The full RES_W x RES_W product (at most 66 bits) is formed by one
// multiplier and folded with the Fermat reduction of ssa_pkg (alternating
// sum of FN-bit chunks). Inputs must already be reduced (< q). Purely
// combinational; the SSA multiplier uses one instance for all N_PTS points.
module fermat_modmul
  import ssa_pkg::*;
(
  input  res_t a_i,
  input  res_t b_i,
  output res_t p_o
);
  logic [2*RES_W-1:0] prod;

  always_comb begin
    prod = (2*RES_W)'(a_i) * (2*RES_W)'(b_i);
    p_o  = mod_reduce(wide_t'(prod));
  end
endmodule
