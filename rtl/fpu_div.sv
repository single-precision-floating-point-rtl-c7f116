// fpu_div: the divide unit.
//
// Divides the normalized 24-bit significand of A by that of B ("divide
// significands" in the document) and passes the exponent and sign from
// fpu_pre_norm_muldiv along.  The document gives only the function; the
// divider here is this design's choice: a restoring division unrolled into
// 27 compare-and-subtract steps, so that a new division can start every clock
// like the other units.  It produces Q = floor(fracta * 2^26 / fractb); with
// both inputs in [1,2) the quotient lies in (1/2, 2), Q has 26 or 27
// significant bits, and a nonzero final remainder becomes the sticky bit.
// Q, whose binary point sits after bit 26, is placed in sig[48:22] of the
// common unrounded form.  A zero divisor gives a meaningless quotient; the
// exceptions unit supplies the result in that case.
//
// Timing: one register stage.
module fpu_div
  import fpu_pkg::*;
(
  input  logic              clk,
  input  logic [SIG_W-1:0]  fracta,
  input  logic [SIG_W-1:0]  fractb,
  input  xexp_t             exp_in,
  input  logic              sign_in,
  output unrounded_t        res
);

  localparam int unsigned QW = SIG_W + 3;   // 27 quotient bits

  logic [QW-1:0]    quo;
  logic [SIG_W+1:0] rem;                    // partial remainder, < 2 * fractb

  always_comb begin
    rem = {2'b00, fracta};
    quo = '0;
    for (int i = QW - 1; i >= 0; i--) begin
      if (rem >= {2'b00, fractb}) begin
        quo[i] = 1'b1;
        rem    = rem - {2'b00, fractb};
      end
      if (i != 0)
        rem = rem << 1;
    end
  end

  always_ff @(posedge clk) begin
    res.sign   <= sign_in;
    res.exp    <= exp_in;
    res.sig    <= {1'b0, quo, 22'b0};
    res.sticky <= (rem != '0);
  end

endmodule
