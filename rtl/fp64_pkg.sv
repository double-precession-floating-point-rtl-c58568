// fp64_pkg: IEEE-754 binary64 fields, exception flags and the operation and
// result records that the accelerator's control unit and processing elements
// exchange.
//
// Number handling shared by the adder and the multiplier (this design's
// choice; the source paper only asks for double precision): round to nearest,
// ties to even; subnormal inputs are read as zero and results below the
// normal range are flushed to a signed zero (flush-to-zero); every NaN result
// is the quiet NaN QNAN.
package fp64_pkg;

  localparam int unsigned EXP_W  = 11;
  localparam int unsigned FRAC_W = 52;
  localparam int unsigned MANT_W = FRAC_W + 1;        // 53, with hidden bit
  localparam int unsigned BIAS   = 1023;
  localparam logic [EXP_W-1:0] EXP_MAX = '1;

  localparam logic [63:0] QNAN = 64'h7FF8_0000_0000_0000;

  typedef struct packed {
    logic              sign;
    logic [EXP_W-1:0]  exp;
    logic [FRAC_W-1:0] frac;
  } fp64_t;

  typedef struct packed {
    logic invalid;    // NaN operand, inf*0 or inf-inf
    logic overflow;   // rounded to infinity
    logic underflow;  // flushed to zero
  } fp_flags_t;

  typedef enum logic {OP_ADD = 1'b0, OP_MUL = 1'b1} op_e;

  localparam int unsigned TAG_W = 8;

  // one arithmetic task, sent by the control unit to a processing element
  typedef struct packed {
    op_e              op;
    logic [TAG_W-1:0] tag;
    logic [63:0]      a;
    logic [63:0]      b;
  } pe_op_t;

  // its result, returned by the processing element
  typedef struct packed {
    logic [TAG_W-1:0] tag;
    logic [63:0]      value;
    fp_flags_t        flags;
  } pe_res_t;

  function automatic logic is_nan(input fp64_t x);
    return x.exp == EXP_MAX && x.frac != '0;
  endfunction

  function automatic logic is_inf(input fp64_t x);
    return x.exp == EXP_MAX && x.frac == '0;
  endfunction

  // zero or subnormal: both read as zero
  function automatic logic is_zero(input fp64_t x);
    return x.exp == '0;
  endfunction

endpackage
