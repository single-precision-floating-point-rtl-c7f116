// fpu_pre_norm_muldiv: pre-normalization for multiplication and division.
//
// The port list is the one of the document's top-level entity figure
// (fpu_op, opa, opb, clk in; exp_out, exp_ovf, fracta, fractb, underflow,
// inf, sign, sign_exe out).  What each output carries is this design's
// reading, since the document prints only the names:
//
//   fracta, fractb  24-bit significands with the hidden bit made explicit.
//                   A subnormal operand is shifted left until its leading one
//                   reaches bit 23, so both fractions enter the multiplier and
//                   the divider normalized (a zero operand stays zero).
//   {exp_ovf, exp_out}
//                   the biased result exponent before post-normalization, as
//                   a 10-bit two's complement number: eA + eB - 127 for a
//                   multiply, eA - eB + 127 for a divide, where a subnormal's
//                   exponent is 1 minus its normalization shift.  exp_ovf[1]
//                   is therefore set when the exponent is negative, and
//                   exp_ovf[0] on a negative one or one above 255.
//   underflow[0]    opa is subnormal
//   underflow[1]    opb is subnormal
//   underflow[2]    the result exponent is below 1 (result may be subnormal)
//   inf             opa or opb is an infinity
//   sign            sign of the result, sign(opa) xor sign(opb)
//   sign_exe        both operands negative
//
// Timing: one register stage; outputs follow the inputs by one clock.
module fpu_pre_norm_muldiv
  import fpu_pkg::*;
(
  input  logic              clk,
  input  logic [2:0]        fpu_op,     // FPU_DIV selects the divide exponent
  input  logic [31:0]       opa,
  input  logic [31:0]       opb,
  output logic [7:0]        exp_out,
  output logic [1:0]        exp_ovf,
  output logic [23:0]       fracta,
  output logic [23:0]       fractb,
  output logic [2:0]        underflow,
  output logic              inf,
  output logic              sign,
  output logic              sign_exe
);

  fp32_t a, b;
  assign a = opa;
  assign b = opb;

  // Leading zeros of a 24-bit significand (24 for zero).
  function automatic logic [4:0] lzc24(input logic [SIG_W-1:0] m);
    lzc24 = 5'd24;
    for (int i = 0; i < SIG_W; i++)
      if (m[i]) lzc24 = 5'(SIG_W - 1 - i);
  endfunction

  logic [SIG_W-1:0] ma, mb;
  logic [4:0]       lza, lzb;
  xexp_t            xa, xb, xe;

  always_comb begin
    ma  = {a.exp != '0, a.frac};
    mb  = {b.exp != '0, b.frac};
    lza = lzc24(ma);
    lzb = lzc24(mb);
    // A zero significand is left unshifted; the exceptions unit owns zeros.
    if (ma == '0) lza = '0;
    if (mb == '0) lzb = '0;
    xa = (a.exp == '0) ? xexp_t'(1) - xexp_t'(lza) : xexp_t'(a.exp);
    xb = (b.exp == '0) ? xexp_t'(1) - xexp_t'(lzb) : xexp_t'(b.exp);
    if (fpu_op == FPU_DIV)
      xe = xa - xb + xexp_t'(BIAS);
    else
      xe = xa + xb - xexp_t'(BIAS);
  end

  always_ff @(posedge clk) begin
    fracta       <= ma << lza;
    fractb       <= mb << lzb;
    {exp_ovf, exp_out} <= xe;
    underflow[0] <= (a.exp == '0) && (a.frac != '0);
    underflow[1] <= (b.exp == '0) && (b.frac != '0);
    underflow[2] <= (xe < xexp_t'(1));
    inf          <= ((a.exp == '1) && (a.frac == '0)) || ((b.exp == '1) && (b.frac == '0));
    sign         <= a.sign ^ b.sign;
    sign_exe     <= a.sign & b.sign;
  end

endmodule
