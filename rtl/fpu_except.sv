// fpu_except: the exceptions unit.
//
// Looks at the two latched operands and the operation and decides whether the
// result is fixed by a special operand, in which case the arithmetic path is
// overridden.  The cases follow IEEE 754:
//
//   any NaN operand                       -> quiet NaN
//   add/sub of opposite infinities        -> quiet NaN (invalid)
//   0 x inf, 0 / 0, inf / inf             -> quiet NaN (invalid)
//   an infinite operand otherwise         -> infinity
//   finite nonzero / 0                    -> infinity, div_by_zero
//   0 x finite, 0 / nonzero, finite / inf -> zero
//   operation codes 4 to 7                -> quiet NaN
//
// As the document requires, a signalling NaN is never produced: the snan
// output only reports that an operand was a signalling NaN (mantissa MSB 0),
// and the result is then a quiet NaN.  Which NaN is produced is not given in
// the document; this design always returns the canonical 0x7FC00000.  The
// result of an operation code above 3 is likewise this design's choice.
// Zero and normal operands of an add or subtract are left to the arithmetic
// path.
//
// Timing: purely combinational; the top level carries its output down the
// pipeline beside the arithmetic units.
module fpu_except
  import fpu_pkg::*;
(
  input  logic [2:0]  fpu_op,
  input  logic [31:0] opa,
  input  logic [31:0] opb,
  output exc_t        exc
);

  fp32_t a, b;
  assign a = opa;
  assign b = opb;

  logic nan_a, nan_b, snan_a, snan_b, inf_a, inf_b, zero_a, zero_b;
  logic sb_eff, sp;

  always_comb begin
    nan_a  = (a.exp == '1) && (a.frac != '0);
    nan_b  = (b.exp == '1) && (b.frac != '0);
    snan_a = nan_a && !a.frac[FRAC_W-1];
    snan_b = nan_b && !b.frac[FRAC_W-1];
    inf_a  = (a.exp == '1) && (a.frac == '0);
    inf_b  = (b.exp == '1) && (b.frac == '0);
    zero_a = (a.exp == '0) && (a.frac == '0);
    zero_b = (b.exp == '0) && (b.frac == '0);
    sb_eff = b.sign ^ (fpu_op == FPU_SUB);
    sp     = a.sign ^ b.sign;

    exc             = '0;
    exc.snan        = snan_a | snan_b;

    unique case (fpu_op)
      FPU_ADD, FPU_SUB: begin
        if (nan_a || nan_b || (inf_a && inf_b && (a.sign != sb_eff))) begin
          exc.special = 1'b1;
          exc.qnan    = 1'b1;
          exc.result  = QNAN;
        end else if (inf_a || inf_b) begin
          exc.special = 1'b1;
          exc.inf     = 1'b1;
          exc.result  = '{sign: inf_a ? a.sign : sb_eff, exp: '1, frac: '0};
        end
      end
      FPU_MUL: begin
        if (nan_a || nan_b || (inf_a && zero_b) || (zero_a && inf_b)) begin
          exc.special = 1'b1;
          exc.qnan    = 1'b1;
          exc.result  = QNAN;
        end else if (inf_a || inf_b) begin
          exc.special = 1'b1;
          exc.inf     = 1'b1;
          exc.result  = '{sign: sp, exp: '1, frac: '0};
        end else if (zero_a || zero_b) begin
          exc.special = 1'b1;
          exc.result  = '{sign: sp, exp: '0, frac: '0};
        end
      end
      FPU_DIV: begin
        if (nan_a || nan_b || (zero_a && zero_b) || (inf_a && inf_b)) begin
          exc.special = 1'b1;
          exc.qnan    = 1'b1;
          exc.result  = QNAN;
        end else if (inf_a || zero_b) begin
          exc.special     = 1'b1;
          exc.inf         = 1'b1;
          exc.div_by_zero = zero_b;
          exc.result      = '{sign: sp, exp: '1, frac: '0};
        end else if (zero_a || inf_b) begin
          exc.special = 1'b1;
          exc.result  = '{sign: sp, exp: '0, frac: '0};
        end
      end
      default: begin
        exc.special = 1'b1;
        exc.qnan    = 1'b1;
        exc.result  = QNAN;
      end
    endcase
  end

endmodule
