// dpfp_adder: IEEE-754 double precision adder, two pipeline stages.
//
// Stage 1 orders the operands so that A has the larger magnitude, and shifts
// B's significand right by the exponent difference into a 56-bit field
// (hidden bit, 52 fraction bits, guard, round and sticky), ORing every bit
// shifted out into the sticky bit. Stage 2 adds or subtracts, normalises
// (one right shift on carry-out, or a left shift by the leading-zero count
// after cancellation), rounds to nearest-even and packs, handling
// overflow (infinity), underflow (flush to zero), zeros, infinities and NaNs.
// A new operation may enter every cycle (valid_i); its result appears with
// valid_o two clock edges later, the edge that samples the inputs counted
// as the first. The source paper gives the PE an addition block but not its
// design: everything here is this design's choice, with the same number
// handling as the multiplier (fp64_pkg).
module dpfp_adder
  import fp64_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        valid_i,
  input  logic [63:0] a_i,
  input  logic [63:0] b_i,
  output logic        valid_o,
  output logic [63:0] result_o,
  output fp_flags_t   flags_o
);
  localparam int unsigned EXT_W = MANT_W + 3;   // 56: significand + G, R, S

  typedef enum logic [1:0] {K_NUM, K_INF, K_NAN} kind_e;

  // ---- stage 1: classify, order, align ------------------------------------
  fp64_t a, b, hi_op, lo_op;
  kind_e kind_d;
  logic  inf_sign_d;
  logic [EXP_W-1:0] diff;
  logic [EXT_W-1:0] m_big, m_small, m_small_sh;
  logic             sticky;

  assign a = a_i;
  assign b = b_i;

  always_comb begin
    kind_d     = K_NUM;
    inf_sign_d = 1'b0;
    if (is_nan(a) || is_nan(b) || (is_inf(a) && is_inf(b) && a.sign != b.sign))
      kind_d = K_NAN;
    else if (is_inf(a) || is_inf(b)) begin
      kind_d     = K_INF;
      inf_sign_d = is_inf(a) ? a.sign : b.sign;
    end

    if ({a.exp, a.frac} >= {b.exp, b.frac}) begin
      hi_op = a; lo_op = b;
    end else begin
      hi_op = b; lo_op = a;
    end
    m_big   = is_zero(hi_op)   ? '0 : {1'b1, hi_op.frac, 3'b000};
    m_small = is_zero(lo_op) ? '0 : {1'b1, lo_op.frac, 3'b000};
    diff    = hi_op.exp - lo_op.exp;
    sticky  = 1'b0;
    if (diff >= EXP_W'(EXT_W)) begin
      m_small_sh = {{(EXT_W-1){1'b0}}, |m_small};
    end else begin
      for (int i = 0; i < EXT_W; i++)
        if (i < int'(diff)) sticky |= m_small[i];
      m_small_sh = (m_small >> diff) | EXT_W'(sticky);
    end
  end

  logic             v1;
  kind_e            kind_q;
  logic             inf_sign_q, sign_big_q, sign_small_q;
  logic [EXP_W-1:0] exp_q;
  logic [EXT_W-1:0] m_big_q, m_small_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1           <= 1'b0;
      kind_q       <= K_NUM;
      inf_sign_q   <= 1'b0;
      sign_big_q   <= 1'b0;
      sign_small_q <= 1'b0;
      exp_q        <= '0;
      m_big_q      <= '0;
      m_small_q    <= '0;
    end else begin
      v1 <= valid_i;
      if (valid_i) begin
        kind_q       <= kind_d;
        inf_sign_q   <= inf_sign_d;
        sign_big_q   <= hi_op.sign;
        sign_small_q <= lo_op.sign;
        exp_q        <= hi_op.exp;
        m_big_q      <= m_big;
        m_small_q    <= m_small_sh;
      end
    end
  end

  // ---- stage 2: add, normalise, round, pack --------------------------------
  logic [EXT_W:0]     sum;
  logic [EXT_W-1:0]   norm;
  logic signed [13:0] exp_n;
  int unsigned        lz;
  logic               round_up;
  logic [MANT_W:0]    mant_r;
  fp64_t              res_d;
  fp_flags_t          flg_d;

  always_comb begin
    if (sign_big_q != sign_small_q) sum = {1'b0, m_big_q} - {1'b0, m_small_q};
    else                            sum = {1'b0, m_big_q} + {1'b0, m_small_q};

    lz = 0;
    if (sum[EXT_W]) begin
      norm  = sum[EXT_W:1] | EXT_W'(sum[0]);
      exp_n = 14'(exp_q) + 14'sd1;
    end else begin
      // leading-zero count: the lowest i reached last wins, so scan upwards
      for (int i = 0; i < EXT_W; i++)
        if (sum[i]) lz = EXT_W - 1 - i;
      norm  = sum[EXT_W-1:0] << lz;
      exp_n = 14'(exp_q) - 14'(lz);
    end

    round_up = norm[2] && (norm[1] || norm[0] || norm[3]);
    mant_r   = {1'b0, norm[EXT_W-1:3]} + (MANT_W+1)'(round_up);
    if (mant_r[MANT_W]) begin
      mant_r = mant_r >> 1;
      exp_n  = exp_n + 14'sd1;
    end

    flg_d = '0;
    res_d = '{sign: sign_big_q, exp: '0, frac: '0};
    unique case (kind_q)
      K_NAN: begin
        res_d         = QNAN;
        flg_d.invalid = 1'b1;
      end
      K_INF: res_d = '{sign: inf_sign_q, exp: EXP_MAX, frac: '0};
      default: begin
        if (sum == '0) begin
          // exact zero: negative only when both operands are negative
          res_d.sign = sign_big_q & sign_small_q;
        end else if (exp_n >= 14'sd2047) begin
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
      valid_o  <= 1'b0;
      result_o <= '0;
      flags_o  <= '0;
    end else begin
      valid_o <= v1;
      if (v1) begin
        result_o <= res_d;
        flags_o  <= flg_d;
      end
    end
  end
endmodule
