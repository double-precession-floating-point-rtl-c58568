// dpfp_multiplier: IEEE-754 double precision multiplier whose 53 x 53-bit
// significand product comes from the Schonhage-Strassen multiplier
// (ssa_multiplier).
//
// On a start pulse the signs and exponents are combined and the two
// significands (hidden bit included) are handed to the SSA multiplier. When
// its 106-bit product is ready, one more cycle normalises it (the product of
// two values in [1,2) lies in [1,4), so at most one right shift), rounds to
// nearest-even using a guard and a sticky bit, and handles exponent overflow
// (infinity) and underflow (flush to zero) and the special operands
// (NaN, infinity, zero). done_o pulses SSA_LATENCY + 1 = 13 cycles after
// the start edge; result_o and flags_o hold until the next result. busy_o is
// high while an operation is in flight; start is ignored then.
// Using SSA for the significand follows the source paper; rounding mode,
// flush-to-zero and the latency are this design's choices.
module dpfp_multiplier
  import fp64_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start_i,
  input  logic [63:0] a_i,
  input  logic [63:0] b_i,
  output logic        busy_o,
  output logic        done_o,
  output logic [63:0] result_o,
  output fp_flags_t   flags_o
);
  localparam int unsigned PROD_W = 2 * MANT_W;

  fp64_t a, b;
  assign a = a_i;
  assign b = b_i;

  // operation state latched at start
  typedef enum logic [1:0] {K_NUM, K_ZERO, K_INF, K_NAN} kind_e;
  kind_e              kind_q;
  logic               sign_q;
  logic signed [13:0] exp_q;     // ea + eb - BIAS, unbiased sum
  logic               busy_q;

  logic                ssa_busy, ssa_done;
  logic [PROD_W-1:0]   prod;
  logic                start_ok;

  assign start_ok = start_i && !busy_q;

  ssa_multiplier u_ssa (
    .clk, .rst_n, .start_i(start_ok),
    .x_i(is_zero(a) ? '0 : {1'b1, a.frac}),
    .y_i(is_zero(b) ? '0 : {1'b1, b.frac}),
    .busy_o(ssa_busy), .done_o(ssa_done), .prod_o(prod));

  // classify the operands
  kind_e kind_d;
  always_comb begin
    if (is_nan(a) || is_nan(b) ||
        (is_inf(a) && is_zero(b)) || (is_zero(a) && is_inf(b)))
      kind_d = K_NAN;
    else if (is_inf(a) || is_inf(b))
      kind_d = K_INF;
    else if (is_zero(a) || is_zero(b))
      kind_d = K_ZERO;
    else
      kind_d = K_NUM;
  end

  // normalise and round the significand product
  logic [MANT_W-1:0]  mant;
  logic [MANT_W:0]    mant_r;
  logic               guard, sticky, round_up;
  logic signed [13:0] exp_n;
  fp64_t              res_d;
  fp_flags_t          flg_d;

  always_comb begin
    if (prod[PROD_W-1]) begin
      mant   = prod[PROD_W-1 -: MANT_W];
      guard  = prod[PROD_W-1-MANT_W];
      sticky = |prod[PROD_W-2-MANT_W:0];
      exp_n  = exp_q + 14'sd1;
    end else begin
      mant   = prod[PROD_W-2 -: MANT_W];
      guard  = prod[PROD_W-2-MANT_W];
      sticky = |prod[PROD_W-3-MANT_W:0];
      exp_n  = exp_q;
    end
    round_up = guard && (sticky || mant[0]);
    mant_r   = {1'b0, mant} + (MANT_W+1)'(round_up);
    if (mant_r[MANT_W]) begin
      mant_r = mant_r >> 1;
      exp_n  = exp_n + 14'sd1;
    end

    flg_d = '0;
    res_d = '{sign: sign_q, exp: '0, frac: '0};
    unique case (kind_q)
      K_NAN:  begin
                res_d       = QNAN;
                flg_d.invalid = 1'b1;
              end
      K_INF:  res_d.exp = EXP_MAX;
      K_ZERO: ;
      default: begin
        if (exp_n >= 14'sd2047) begin
          res_d.exp      = EXP_MAX;
          flg_d.overflow = 1'b1;
        end else if (exp_n <= 14'sd0) begin
          flg_d.underflow = 1'b1;
        end else begin
          res_d.exp  = exp_n[EXP_W-1:0];
          res_d.frac = mant_r[FRAC_W-1:0];
        end
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      kind_q   <= K_ZERO;
      sign_q   <= 1'b0;
      exp_q    <= '0;
      busy_q   <= 1'b0;
      done_o   <= 1'b0;
      result_o <= '0;
      flags_o  <= '0;
    end else begin
      done_o <= 1'b0;
      if (start_ok) begin
        kind_q <= kind_d;
        sign_q <= a.sign ^ b.sign;
        exp_q  <= 14'(a.exp) + 14'(b.exp) - 14'(BIAS);
        busy_q <= 1'b1;
      end
      if (ssa_done) begin
        result_o <= res_d;
        flags_o  <= flg_d;
        done_o   <= 1'b1;
        busy_q   <= 1'b0;
      end
    end
  end

  assign busy_o = busy_q;

  logic unused;
  assign unused = ssa_busy;
endmodule
