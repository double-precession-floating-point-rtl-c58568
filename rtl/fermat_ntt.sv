// fermat_ntt: N_PTS-point number theoretic transform modulo q = 2^FN + 1
// (the FFT and IFFT blocks of the SSA multiplier).
//
// Forward:  C_j = sum_i c_i * g^(i*j) mod q,   g = 2^ROOT_SH
// Inverse:  c_i = N^-1 * sum_j C_j * g^(-i*j) mod q
// It is a radix-2 decimation-in-time FFT: the inputs are taken in
// bit-reversed order and LOG_N butterfly stages each split a transform into
// its even and odd halves (the recursion the source paper writes out). Because g
// is a power of two, every twiddle multiplication is a shift and a
// reduction; the inverse uses g^-k = 2^(2FN - k*ROOT_SH) and scales by
// N^-1 = 2^(2FN - LOG_N), again a shift. Purely combinational; the
// transform follows the source paper, the radix-2 structure with power-of-two
// roots is the standard Fermat-number choice made here.
module fermat_ntt
  import ssa_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  res_t x_i [N_PTS],
  output res_t y_o [N_PTS]
);
  res_t stage [LOG_N+1][N_PTS];

  function automatic int unsigned bitrev(input int unsigned v);
    int unsigned r = 0;
    for (int b = 0; b < LOG_N; b++) r |= ((v >> b) & 1) << (LOG_N - 1 - b);
    return r;
  endfunction

  always_comb begin
    for (int i = 0; i < N_PTS; i++) stage[0][i] = x_i[bitrev(i)];
    for (int s = 0; s < LOG_N; s++) begin
      int unsigned half, span, tw;
      res_t t;
      half = 1 << s;
      span = half << 1;
      for (int base = 0; base < N_PTS; base += span) begin
        for (int j = 0; j < half; j++) begin
          // twiddle g^(j * N/span), or its inverse
          tw = j * (N_PTS / span) * ROOT_SH;
          if (INVERSE && tw != 0) tw = 2 * FN - tw;
          t = mod_shl(stage[s][base+j+half], tw);
          stage[s+1][base+j]      = mod_add(stage[s][base+j], t);
          stage[s+1][base+j+half] = mod_sub(stage[s][base+j], t);
        end
      end
    end
    for (int i = 0; i < N_PTS; i++)
      y_o[i] = INVERSE ? mod_shl(stage[LOG_N][i], NINV_SH) : stage[LOG_N][i];
  end
endmodule
