// ssa_pkg: sizes and modular arithmetic shared by the Schonhage-Strassen
// (SSA) significand multiplier.
//
// The multiplier works in the ring Z/(2^FN + 1) with FN = 32, so a residue
// needs FN+1 = 33 bits (the value 2^FN, i.e. -1, is legal). In that ring 2 is
// a 2*FN = 64th root of unity, so the N = 8 point transform uses the root
// g = 2^(2*FN/N) = 2^8 and every twiddle multiplication is a shift followed by
// a cheap reduction (alternating sum of FN-bit chunks). Each 53-bit operand is
// cut into N/2 = 4 digits of 14 bits and zero padded to N digits, so the cyclic
// convolution equals the acyclic one. The largest convolution coefficient is
// 4 * (2^14-1)^2 < 2^30, well inside the modulus, so the result is exact.
// The 53-bit operand width follows the source paper; N, the digit width and the
// modulus are this design's choice (the source paper names a 3-bit counter, which
// fits N = 8).
package ssa_pkg;

  localparam int unsigned OP_W    = 53;          // significand width (with hidden bit)
  localparam int unsigned PROD_W  = 2 * OP_W;    // 106-bit product
  localparam int unsigned N_PTS   = 8;           // transform length
  localparam int unsigned LOG_N   = $clog2(N_PTS);
  localparam int unsigned DIGIT_W = 14;          // digit width k, base R = 2^k
  localparam int unsigned FN      = 32;          // modulus q = 2^FN + 1
  localparam int unsigned RES_W   = FN + 1;      // residue width
  localparam int unsigned ROOT_SH = 2 * FN / N_PTS;  // g = 2^ROOT_SH
  localparam int unsigned WIDE_W  = 4 * FN;      // widest value reduced
  // N^-1 mod q = 2^(2FN - LOG_N)
  localparam int unsigned NINV_SH = 2 * FN - LOG_N;
  // Cycles from the start pulse to the done pulse of ssa_multiplier:
  // forward NTT of X, forward NTT of Y, N pointwise products, inverse NTT,
  // recombination.
  localparam int unsigned SSA_LATENCY = 2 + N_PTS + 2;

  typedef logic [RES_W-1:0]   res_t;
  typedef logic [DIGIT_W-1:0] digit_t;
  typedef logic [WIDE_W-1:0]  wide_t;

  localparam res_t Q = res_t'((65'd1 << FN) + 65'd1);

  // Reduce a WIDE_W-bit value modulo 2^FN+1: with 2^FN = -1 the value is
  // c0 - c1 + c2 - c3 over its FN-bit chunks.
  function automatic res_t mod_reduce(input wide_t x);
    logic [FN+2:0] pos, neg, d;
    pos = (FN+3)'(x[0*FN +: FN]) + (FN+3)'(x[2*FN +: FN]);
    neg = (FN+3)'(x[1*FN +: FN]) + (FN+3)'(x[3*FN +: FN]);
    // pos, neg < 2^(FN+1); adding 2q = 2^(FN+1)+2 keeps d positive, d < 4q
    d = pos - neg + ((FN+3)'(Q) << 1);
    for (int i = 0; i < 3; i++)
      if (d >= (FN+3)'(Q)) d = d - (FN+3)'(Q);
    return res_t'(d);
  endfunction

  function automatic res_t mod_add(input res_t a, input res_t b);
    logic [RES_W:0] s;
    s = {1'b0, a} + {1'b0, b};
    if (s >= {1'b0, Q}) s = s - {1'b0, Q};
    return s[RES_W-1:0];
  endfunction

  function automatic res_t mod_sub(input res_t a, input res_t b);
    logic [RES_W:0] s;
    if (a >= b) s = {1'b0, a} - {1'b0, b};
    else        s = {1'b0, a} + {1'b0, Q} - {1'b0, b};
    return s[RES_W-1:0];
  endfunction

  // a * 2^sh mod q, sh < 2*FN
  function automatic res_t mod_shl(input res_t a, input int unsigned sh);
    return mod_reduce(wide_t'(a) << (sh % (2 * FN)));
  endfunction

endpackage
