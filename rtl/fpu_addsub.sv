// fpu_addsub: the add/subtract unit.
//
// Takes the aligned fractions from fpu_pre_norm_addsub and either adds them
// (equal signs) or subtracts the small one from the large one (different
// signs), the result taking the exponent of the large operand.  A negative
// difference, possible only when both exponents are equal, is turned back
// into a magnitude by taking its two's complement and the sign flips, in the
// spirit of the document's "take the 2's complement ... and then add".
//
// An exact zero from a subtraction is +0, or -0 in round-toward-minus-infinity
// mode; this IEEE 754 rule is this design's choice, the document does not
// discuss signed zeros.
//
// The output is the common unrounded form of fpu_pkg: the 28-bit sum, whose
// binary point sits after bit 26, is placed in sig[49:22] so that the point
// lands after sig[48].
//
// Timing: one register stage.
module fpu_addsub
  import fpu_pkg::*;
(
  input  logic              clk,
  input  logic [1:0]        rmode,
  input  logic [SIG_W+2:0]  frac_l,
  input  logic [SIG_W+2:0]  frac_s,
  input  logic [EXP_W-1:0]  exp_l,
  input  logic              sign_l,
  input  logic              sign_s,
  output unrounded_t        res
);

  logic [SIG_W+3:0] sum;     // 28 bits
  logic             sign;

  always_comb begin
    if (sign_l == sign_s) begin
      sum  = {1'b0, frac_l} + {1'b0, frac_s};
      sign = sign_l;
    end else begin
      sum  = {1'b0, frac_l} - {1'b0, frac_s};
      sign = sign_l;
      if (sum[SIG_W+3]) begin
        sum  = ~sum + 1'b1;
        sign = sign_s;
      end
      if (sum == '0)
        sign = (rmode == RM_DOWN);
    end
  end

  always_ff @(posedge clk) begin
    res.sign   <= sign;
    res.exp    <= xexp_t'(exp_l);
    res.sig    <= {sum, 22'b0};
    res.sticky <= 1'b0;
  end

endmodule
