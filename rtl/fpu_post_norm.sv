// fpu_post_norm: post-normalize and round unit.
//
// Picks the unrounded result of the unit that fpu_op names (add/sub,
// multiply or divide), normalizes it and rounds it to single precision in the
// mode given by rmode (0 nearest even, 1 toward zero, 2 toward +inf,
// 3 toward -inf, as in the document's rmode table).
//
// How it works: the leading one of the 50-bit significand is moved to bit 48
// by a shift of lz-1 places (lz = leading zeros), the exponent changing by
// the same amount.  The shift is limited so that the exponent does not drop
// below 1; a result that would need a smaller exponent stays subnormal, and a
// negative shift limit turns into a right shift whose lost bits join the
// sticky bit.  Bits 47:25 then hold the mantissa, bit 24 is the guard bit and
// bits 23:0 plus the incoming sticky bit form the sticky bit.  Rounding adds
// one at bit 25 when the mode asks for it; a carry out of the significand
// moves the exponent up by one.  Overflow (biased exponent 255 or more after
// rounding) gives infinity or the largest finite number depending on the mode
// and sign.
//
// Flags: ine when guard or sticky bits were lost or on overflow; underflow
// when the result is tiny before rounding (below 2^-126) and inexact;
// overflow as above; inf when overflow produced an infinity; zero when the
// result is a zero.  The document names these flags but does not define
// them; the definitions follow IEEE 754 with tininess detected before
// rounding, which is this design's choice.  NaN and infinite operands never
// reach this unit's result (the exceptions unit replaces it).
//
// Timing: one register stage.
module fpu_post_norm
  import fpu_pkg::*;
(
  input  logic        clk,
  input  logic [2:0]  fpu_op,
  input  logic [1:0]  rmode,
  input  unrounded_t  addsub_res,
  input  unrounded_t  mul_res,
  input  unrounded_t  div_res,
  output fp32_t       result,
  output logic        zero,
  output logic        ine,
  output logic        overflow,
  output logic        underflow,
  output logic        inf
);

  unrounded_t       u;
  int               lz;
  int               shl;           // left shift; negative means right shift
  logic [PN_W-1:0]  m;
  logic             lost;          // bits shifted out on a right shift
  logic             guard, sticky, inc;
  logic [SIG_W:0]   rsig;          // rounded significand, 25 bits
  int               xexp;          // exponent after normalization and rounding
  fp32_t            r;
  logic             ovf, tiny, inexact, to_inf;

  always_comb begin
    unique case (fpu_op)
      FPU_MUL: u = mul_res;
      FPU_DIV: u = div_res;
      default: u = addsub_res;
    endcase

    lz = PN_W;
    for (int i = 0; i < PN_W; i++)
      if (u.sig[i]) lz = PN_W - 1 - i;

    shl = lz - 1;
    if (int'(u.exp) - 1 < shl)
      shl = int'(u.exp) - 1;

    lost = 1'b0;
    if (shl >= 0) begin
      m = u.sig << shl;
    end else if (-shl > PN_W) begin
      m    = '0;
      lost = (u.sig != '0);
    end else begin
      m    = u.sig >> (-shl);
      lost = ((u.sig & ~({PN_W{1'b1}} << (-shl))) != '0);
    end
    xexp = int'(u.exp) - shl;

    // After the shift the leading one is at bit 48, or the number is
    // subnormal and the exponent has stopped at 1.
    if (u.sig != '0)
      assert (!m[PN_W-1] && (m[PN_W-2] || xexp == 1))
        else $error("post-normalization left sig=%h exp=%0d", m, xexp);

    guard  = m[PN_W-26];
    sticky = (|m[PN_W-27:0]) | lost | u.sticky;
    unique case (rmode)
      RM_NEAREST_EVEN: inc = guard & (sticky | m[PN_W-25]);
      RM_UP:           inc = ~u.sign & (guard | sticky);
      RM_DOWN:         inc =  u.sign & (guard | sticky);
      default:         inc = 1'b0;
    endcase

    rsig = {1'b0, m[PN_W-2 -: SIG_W]} + (SIG_W+1)'(inc);
    if (rsig[SIG_W]) begin
      rsig = rsig >> 1;
      xexp = xexp + 1;
    end
    tiny    = (u.sig != '0) && !m[PN_W-2];
    inexact = guard | sticky;
    ovf     = (xexp >= 255) && (rsig != '0);
    to_inf  = (rmode == RM_NEAREST_EVEN) || (rmode == RM_UP && !u.sign) ||
              (rmode == RM_DOWN && u.sign);

    r.sign = u.sign;
    if (ovf) begin
      r.exp  = to_inf ? 8'hFF : 8'hFE;
      r.frac = to_inf ? '0 : '1;
    end else begin
      r.exp  = rsig[SIG_W-1] ? EXP_W'(xexp) : '0;
      r.frac = rsig[FRAC_W-1:0];
    end
  end

  always_ff @(posedge clk) begin
    result    <= r;
    zero      <= (r.exp == '0) && (r.frac == '0);
    ine       <= inexact | ovf;
    overflow  <= ovf;
    underflow <= tiny & inexact;
    inf       <= ovf & to_inf;
  end

endmodule
