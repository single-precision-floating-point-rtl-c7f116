// tb_fpu_addsub: checks the add/subtract unit.
//
// Drives random aligned 27-bit fractions with random signs and checks the
// magnitude (large +/- small, a negative difference turned positive), the
// result sign, the sign of an exact zero (+0, or -0 when rounding toward
// minus infinity), the exponent passed through and the placement of the sum
// in the unrounded significand, one clock after the inputs.
module tb_fpu_addsub;
  import fpu_pkg::*;
  logic        clk = 1'b0;
  logic [1:0]  rmode;
  logic [26:0] frac_l, frac_s;
  logic [7:0]  exp_l;
  logic        sign_l, sign_s;
  unrounded_t  res;

  fpu_addsub dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint signed vl, vs, sum;
  logic want_sign;
  logic [49:0] want_sig;
  int n_neg = 0, n_zero = 0;

  initial begin
    for (int i = 0; i < 20000; i++) begin
      frac_l = 27'($urandom);
      frac_s = ($urandom_range(0, 7) == 0) ? frac_l : 27'($urandom);
      exp_l  = 8'($urandom);
      sign_l = 1'($urandom);
      sign_s = 1'($urandom);
      rmode  = 2'($urandom);
      @(posedge clk);
      #1;
      vl  = sign_l ? -longint'(frac_l) : longint'(frac_l);
      vs  = sign_s ? -longint'(frac_s) : longint'(frac_s);
      sum = vl + vs;
      if (sum < 0) begin want_sign = 1'b1; sum = -sum; end
      else if (sum > 0) want_sign = 1'b0;
      else want_sign = (sign_l == sign_s) ? sign_l : (rmode == 2'd3);
      if (sign_l != sign_s && frac_s > frac_l) n_neg++;
      if (sum == 0) n_zero++;
      want_sig = 50'(sum) << 22;
      checks++;
      if (res.sig !== want_sig || res.sign !== want_sign || res.exp !== xexp_t'(exp_l) ||
          res.sticky !== 1'b0) begin
        failures++;
        if (failures < 10)
          $display("MISMATCH l=%h%b s=%h%b rm=%0d: %h %b want %h %b", frac_l, sign_l, frac_s, sign_s,
                   rmode, res.sig, res.sign, want_sig, want_sign);
      end
    end
    if (n_neg == 0 || n_zero == 0) begin
      failures++;
      $display("negative difference or exact zero never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
