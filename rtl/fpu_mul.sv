// fpu_mul: the multiply unit.
//
// Multiplies the two 24-bit significands prepared by fpu_pre_norm_muldiv
// (frac_O = frac_A x frac_B in the multiplication flow chart) and passes the
// exponent and sign computed there along.  The 48-bit product of two numbers
// in [1,2) lies in [1,4), its binary point after bit 46; it is placed in
// sig[49:2] of the common unrounded form so that the point lands after
// sig[48].  The product is exact, so the sticky bit is zero.  The document
// does not say how the multiplier is built; this is a plain array multiply
// left to synthesis.
//
// Timing: one register stage.
module fpu_mul
  import fpu_pkg::*;
(
  input  logic              clk,
  input  logic [SIG_W-1:0]  fracta,
  input  logic [SIG_W-1:0]  fractb,
  input  xexp_t             exp_in,
  input  logic              sign_in,
  output unrounded_t        res
);

  logic [2*SIG_W-1:0] prod;

  assign prod = fracta * fractb;

  always_ff @(posedge clk) begin
    res.sign   <= sign_in;
    res.exp    <= exp_in;
    res.sig    <= {prod, 2'b00};
    res.sticky <= 1'b0;
  end

endmodule
