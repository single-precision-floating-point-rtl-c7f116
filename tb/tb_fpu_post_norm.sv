// tb_fpu_post_norm: checks normalization and rounding.
//
// Feeds random unrounded results of the shapes the three units produce (a
// 28-bit add/sub sum, a 48-bit product of normalized significands, a 27-bit
// quotient with a sticky bit) with exponents from far below the subnormal
// range to far above the overflow limit, in all four rounding modes.  The
// expected result and flags come from round_exact() of fpu_ref_pkg, which
// rounds the exact value sig * 2^(exp - 127 - 48) with wide integers.
// Outputs are checked one clock after the inputs.
module tb_fpu_post_norm;
  import fpu_pkg::*;
  import fpu_ref_pkg::*;
  logic        clk = 1'b0;
  logic [2:0]  fpu_op;
  logic [1:0]  rmode;
  unrounded_t  addsub_res, mul_res, div_res;
  fp32_t       result;
  logic        zero, ine, overflow, underflow, inf;

  fpu_post_norm dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  unrounded_t u;
  ref_out_t   e;
  logic [47:0] p;
  int n_ovf = 0, n_unf = 0, n_sub = 0, n_carry = 0;

  initial begin
    for (int i = 0; i < 50000; i++) begin
      fpu_op = 3'($urandom_range(0, 3));
      rmode  = 2'($urandom_range(0, 3));
      u.sign = 1'($urandom);
      u.exp  = xexp_t'($urandom_range(0, 700)) - xexp_t'(250);
      u.sticky = 1'b0;
      case (fpu_op)
        3'd2: begin
          p = {24'($urandom) | 24'h800000} * {24'($urandom) | 24'h800000};
          if (i % 16 == 0) p = 48'hFFFFFF * 48'hFFFFFF;
          u.sig = {p, 2'b00};
        end
        3'd3: begin
          u.sig = {1'b0, 27'($urandom) | (i[0] ? 27'h4000000 : 27'h2000000), 22'b0};
          u.sticky = 1'($urandom);
        end
        default: begin
          u.sig = {28'($urandom) >> $urandom_range(0, 27), 22'b0};
          if (i % 16 == 0) u.sig = {28'hFFFFFFF, 22'b0};
        end
      endcase
      addsub_res = (fpu_op <= 3'd1) ? u : unrounded_t'($urandom);
      mul_res    = (fpu_op == 3'd2) ? u : unrounded_t'($urandom);
      div_res    = (fpu_op == 3'd3) ? u : unrounded_t'($urandom);
      @(posedge clk);
      #1;
      e = round_exact(u.sign, NW'(u.sig), int'(u.exp) - 175, u.sticky, rmode);
      n_ovf   += int'(e.overflow);
      n_unf   += int'(e.underflow);
      n_sub   += int'(e.result[30:23] == 0 && e.result[22:0] != 0);
      checks++;
      if (result !== e.result || zero !== e.zero || ine !== e.ine || overflow !== e.overflow ||
          underflow !== e.underflow || inf !== e.inf) begin
        failures++;
        if (failures < 10)
          $display("MISMATCH op=%0d rm=%0d sig=%h e=%0d st=%b: %h z%b i%b o%b u%b inf%b want %h z%b i%b o%b u%b inf%b",
                   fpu_op, rmode, u.sig, u.exp, u.sticky, result, zero, ine, overflow, underflow, inf,
                   e.result, e.zero, e.ine, e.overflow, e.underflow, e.inf);
      end
    end
    if (n_ovf == 0 || n_unf == 0 || n_sub == 0) begin
      failures++;
      $display("overflow %0d underflow %0d subnormal %0d", n_ovf, n_unf, n_sub);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
