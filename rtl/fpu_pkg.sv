// fpu_pkg: types and constants shared by the single precision FPU.
//
// An IEEE 754 single is {sign, 8-bit biased exponent, 23-bit mantissa}
// (bit 31 sign, bits 30:23 exponent, bits 22:0 mantissa), the hidden leading
// one of normal numbers made explicit inside the datapath.  The operation
// codes are those driven on fpu_op in the reference waveform (0 add, 1 sub,
// 2 mul, 3 div); the rounding codes follow the rmode table (0 nearest even,
// 1 toward zero, 2 toward +inf, 3 toward -inf).
package fpu_pkg;

  localparam int unsigned EXP_W  = 8;
  localparam int unsigned FRAC_W = 23;
  localparam int unsigned SIG_W  = FRAC_W + 1;   // significand with hidden bit
  localparam int unsigned BIAS   = 127;

  // Width of the unrounded significand handed to post-normalization:
  // two integer bits (bits 49:48) and 48 fraction bits.
  localparam int unsigned PN_W = 50;

  // Signed exponent used inside the datapath (biased, may leave 1..254).
  localparam int unsigned XEXP_W = 10;
  typedef logic signed [XEXP_W-1:0] xexp_t;

  typedef enum logic [2:0] {
    FPU_ADD = 3'd0,
    FPU_SUB = 3'd1,
    FPU_MUL = 3'd2,
    FPU_DIV = 3'd3
  } fpu_op_e;

  typedef enum logic [1:0] {
    RM_NEAREST_EVEN = 2'd0,
    RM_ZERO         = 2'd1,
    RM_UP           = 2'd2,
    RM_DOWN         = 2'd3
  } rmode_e;

  typedef struct packed {
    logic              sign;
    logic [EXP_W-1:0]  exp;
    logic [FRAC_W-1:0] frac;
  } fp32_t;

  // Unrounded result of one arithmetic unit:
  // value = (-1)^sign * sig / 2^48 * 2^(exp - BIAS), plus a sticky bit for
  // nonzero bits below sig[0].
  typedef struct packed {
    logic            sign;
    xexp_t           exp;
    logic [PN_W-1:0] sig;
    logic            sticky;
  } unrounded_t;

  // Outcome of the exceptions unit for one operation.
  typedef struct packed {
    logic  special;       // result is fixed by a NaN, infinite or zero operand
    fp32_t result;        // that result
    logic  snan;          // an operand was a signalling NaN
    logic  qnan;          // result is a (quiet) NaN
    logic  inf;           // result is an infinity
    logic  div_by_zero;   // finite nonzero divided by zero
  } exc_t;

  localparam fp32_t QNAN = '{sign: 1'b0, exp: '1, frac: 23'h400000};

endpackage
