// fpu: pipelined IEEE 754 single precision floating point unit.
//
// Adds, subtracts, multiplies and divides two 32-bit floats, rounding in one
// of four modes.  A new operation can be issued every clock: fpu_op, rmode,
// opa and opb are latched at a rising edge and the result with its flags is
// on the outputs after the fourth rising edge that follows, as the
// document specifies.  There is no valid signal and no
// reset: every clock issues an operation, and the outputs are meaningful
// four clocks after the first operation.
//
// Organisation, after the document's architecture figure:
//
//   edge 0  input latch                      fpu_op, rmode, opa, opb
//   edge 1  pre-normalization                fpu_pre_norm_addsub, fpu_pre_norm_muldiv
//   edge 2  arithmetic                       fpu_addsub, fpu_mul, fpu_div
//   edge 3  post-normalize and round         fpu_post_norm
//   edge 4  output register                  exceptions unit result merged in
//
// The exceptions unit (fpu_except) classifies the latched operands; its
// verdict travels down the pipeline and, for NaN, infinite and zero operands
// of a multiply or divide and for NaN or infinite operands of an add or
// subtract, replaces the arithmetic result at the output register.  All
// three units work on every operation; post-normalization picks the one
// fpu_op names.  The split of the work into these four stages is this
// design's choice: the document gives the blocks and the four-cycle latency.
//
// The mul/div pre-normalizer's status outputs underflow, inf and sign_exe
// are not needed by this datapath (the exceptions unit and post-normalization
// work them out themselves) and are left unread here.
//
// Outputs: fpout (result), zero, ine (inexact), overflow, underflow, inf,
// qnan (result is a NaN), snan (an operand was a signalling NaN) and
// div_by_zero, the signals of the document's waveform.
module fpu
  import fpu_pkg::*;
(
  input  logic        clk,
  input  logic [2:0]  fpu_op,
  input  logic [1:0]  rmode,
  input  logic [31:0] opa,
  input  logic [31:0] opb,
  output logic [31:0] fpout,
  output logic        zero,
  output logic        ine,
  output logic        overflow,
  output logic        underflow,
  output logic        inf,
  output logic        qnan,
  output logic        snan,
  output logic        div_by_zero
);

  // ---- edge 0: input latch ------------------------------------------------
  logic [2:0]  op_q;
  logic [1:0]  rmode_q;
  logic [31:0] opa_q, opb_q;

  always_ff @(posedge clk) begin
    op_q    <= fpu_op;
    rmode_q <= rmode;
    opa_q   <= opa;
    opb_q   <= opb;
  end

  // ---- exceptions unit, carried along the pipeline -----------------------
  exc_t exc_0, exc_1, exc_2, exc_3;

  fpu_except u_except (
    .fpu_op (op_q),
    .opa    (opa_q),
    .opb    (opb_q),
    .exc    (exc_0)
  );

  // Operation and rounding mode travel with the data.
  logic [2:0] op_1, op_2;
  logic [1:0] rmode_1, rmode_2;

  always_ff @(posedge clk) begin
    exc_1   <= exc_0;
    exc_2   <= exc_1;
    exc_3   <= exc_2;
    op_1    <= op_q;
    op_2    <= op_1;
    rmode_1 <= rmode_q;
    rmode_2 <= rmode_1;
  end

  // ---- edge 1: pre-normalization -----------------------------------------
  logic [SIG_W+2:0] as_frac_l, as_frac_s;
  logic [EXP_W-1:0] as_exp_l;
  logic             as_sign_l, as_sign_s;

  fpu_pre_norm_addsub u_pre_addsub (
    .clk    (clk),
    .fpu_op (op_q),
    .opa    (opa_q),
    .opb    (opb_q),
    .frac_l (as_frac_l),
    .frac_s (as_frac_s),
    .exp_l  (as_exp_l),
    .sign_l (as_sign_l),
    .sign_s (as_sign_s)
  );

  logic [7:0]  md_exp_out;
  logic [1:0]  md_exp_ovf;
  logic [23:0] md_fracta, md_fractb;
  logic [2:0]  md_underflow;
  logic        md_inf, md_sign, md_sign_exe;

  fpu_pre_norm_muldiv u_pre_muldiv (
    .clk       (clk),
    .fpu_op    (op_q),
    .opa       (opa_q),
    .opb       (opb_q),
    .exp_out   (md_exp_out),
    .exp_ovf   (md_exp_ovf),
    .fracta    (md_fracta),
    .fractb    (md_fractb),
    .underflow (md_underflow),
    .inf       (md_inf),
    .sign      (md_sign),
    .sign_exe  (md_sign_exe)
  );

  xexp_t md_exp;
  assign md_exp = {md_exp_ovf, md_exp_out};

  // ---- edge 2: arithmetic units ------------------------------------------
  unrounded_t addsub_res, mul_res, div_res;

  fpu_addsub u_addsub (
    .clk    (clk),
    .rmode  (rmode_1),
    .frac_l (as_frac_l),
    .frac_s (as_frac_s),
    .exp_l  (as_exp_l),
    .sign_l (as_sign_l),
    .sign_s (as_sign_s),
    .res    (addsub_res)
  );

  fpu_mul u_mul (
    .clk     (clk),
    .fracta  (md_fracta),
    .fractb  (md_fractb),
    .exp_in  (md_exp),
    .sign_in (md_sign),
    .res     (mul_res)
  );

  fpu_div u_div (
    .clk     (clk),
    .fracta  (md_fracta),
    .fractb  (md_fractb),
    .exp_in  (md_exp),
    .sign_in (md_sign),
    .res     (div_res)
  );

  // ---- edge 3: post-normalize and round ----------------------------------
  fp32_t pn_result;
  logic  pn_zero, pn_ine, pn_overflow, pn_underflow, pn_inf;

  fpu_post_norm u_post_norm (
    .clk        (clk),
    .fpu_op     (op_2),
    .rmode      (rmode_2),
    .addsub_res (addsub_res),
    .mul_res    (mul_res),
    .div_res    (div_res),
    .result     (pn_result),
    .zero       (pn_zero),
    .ine        (pn_ine),
    .overflow   (pn_overflow),
    .underflow  (pn_underflow),
    .inf        (pn_inf)
  );

  // ---- edge 4: output register -------------------------------------------
  always_ff @(posedge clk) begin
    snan        <= exc_3.snan;
    if (exc_3.special) begin
      fpout       <= exc_3.result;
      zero        <= (exc_3.result.exp == '0);
      ine         <= 1'b0;
      overflow    <= 1'b0;
      underflow   <= 1'b0;
      inf         <= exc_3.inf;
      qnan        <= exc_3.qnan;
      div_by_zero <= exc_3.div_by_zero;
    end else begin
      fpout       <= pn_result;
      zero        <= pn_zero;
      ine         <= pn_ine;
      overflow    <= pn_overflow;
      underflow   <= pn_underflow;
      inf         <= pn_inf;
      qnan        <= 1'b0;
      div_by_zero <= 1'b0;
    end
  end

endmodule
