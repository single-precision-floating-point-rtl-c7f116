// fpu_pre_norm_addsub: pre-normalization for addition and subtraction.
//
// Orders the two operands by exponent and aligns the fraction of the smaller
// one to the larger, as in the add/subtract flow chart: if eA > eB the large
// operand L is A, otherwise it is B; the small fraction is shifted right by
// eL - eS.  The subtract operation is folded into the sign of operand B here,
// so the add/sub unit only has to look at two signs.
//
// Fractions leave as 27 bits: the 24-bit significand (hidden bit explicit,
// zero for subnormals, whose exponent is taken as 1) followed by guard, round
// and sticky bits; every bit shifted out of the small fraction is ORed into
// its sticky bit.  The three extra bits and the sticky scheme are this
// design's choice; the document only says that the fractions are adjusted.
//
// Timing: one register stage; outputs follow the inputs by one clock.
module fpu_pre_norm_addsub
  import fpu_pkg::*;
(
  input  logic                 clk,
  input  logic [2:0]           fpu_op,   // FPU_SUB negates B, anything else adds
  input  logic [31:0]          opa,
  input  logic [31:0]          opb,
  output logic [SIG_W+2:0]     frac_l,   // aligned large fraction, 27 bits
  output logic [SIG_W+2:0]     frac_s,   // aligned small fraction, 27 bits
  output logic [EXP_W-1:0]     exp_l,    // exponent of the large operand (1 for subnormals)
  output logic                 sign_l,   // sign of the large operand
  output logic                 sign_s    // sign of the small operand
);

  fp32_t a, b;
  assign a = opa;
  assign b = opb;

  logic [EXP_W-1:0]  ea, eb, el, es;
  logic [SIG_W-1:0]  ma, mb, ml, ms;
  logic              sa, sb, sl, ss;
  logic [EXP_W-1:0]  diff;
  logic [2*SIG_W+5:0] wide;            // small fraction, 27 bits + 27 bits shifted out
  logic [SIG_W+2:0]   aligned;

  always_comb begin
    ea = (a.exp == '0) ? EXP_W'(1) : a.exp;
    eb = (b.exp == '0) ? EXP_W'(1) : b.exp;
    ma = {a.exp != '0, a.frac};
    mb = {b.exp != '0, b.frac};
    sa = a.sign;
    sb = b.sign ^ (fpu_op == FPU_SUB);

    if (ea > eb) begin
      el = ea; es = eb; ml = ma; ms = mb; sl = sa; ss = sb;
    end else begin
      el = eb; es = ea; ml = mb; ms = ma; sl = sb; ss = sa;
    end

    diff = el - es;
    // Beyond 27 positions everything is sticky anyway; cap the shift there.
    wide = {ms, 3'b000, 27'b0} >> ((diff > 8'd27) ? 8'd27 : diff);
    aligned = wide[2*SIG_W+5 -: SIG_W+3];
    aligned[0] = aligned[0] | (|wide[SIG_W+2:0]);
  end

  always_ff @(posedge clk) begin
    frac_l <= {ml, 3'b000};
    frac_s <= aligned;
    exp_l  <= el;
    sign_l <= sl;
    sign_s <= ss;
  end

endmodule
