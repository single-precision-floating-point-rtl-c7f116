// tb_fpu_div: checks the significand divider.
//
// Random normalized 24-bit fractions (leading bit set, as the pre-normalizer
// delivers them) plus the corner cases of equal fractions and extreme
// ratios.  The quotient floor(fracta * 2^26 / fractb) and the sticky bit
// (nonzero remainder) are recomputed with 64-bit integer division and must
// appear one clock later, the quotient in sig[48:22].
module tb_fpu_div;
  import fpu_pkg::*;
  logic        clk = 1'b0;
  logic [23:0] fracta, fractb;
  xexp_t       exp_in;
  logic        sign_in;
  unrounded_t  res;

  fpu_div dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint unsigned n, q, r;
  int n_exact = 0;

  initial begin
    for (int i = 0; i < 20000; i++) begin
      fracta  = 24'($urandom) | 24'h800000;
      fractb  = 24'($urandom) | 24'h800000;
      case (i % 8)
        0: fractb = fracta;
        1: begin fracta = 24'hFFFFFF; fractb = 24'h800000; end
        2: begin fracta = 24'h800000; fractb = 24'hFFFFFF; end
        3: fractb = 24'h800000 | (24'h1 << $urandom_range(0, 22));
        default: ;
      endcase
      exp_in  = xexp_t'($urandom);
      sign_in = 1'($urandom);
      @(posedge clk);
      #1;
      n = longint'(fracta) << 26;
      q = n / fractb;
      r = n % fractb;
      if (r == 0) n_exact++;
      checks++;
      if (res.sig !== {1'b0, 27'(q), 22'b0} || res.sticky !== (r != 0) || res.exp !== exp_in ||
          res.sign !== sign_in) begin
        failures++;
        if (failures < 10)
          $display("MISMATCH %h / %h: %h %b want %h %b", fracta, fractb, res.sig, res.sticky, q, r != 0);
      end
    end
    if (n_exact == 0) begin failures++; $display("no exact quotient"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
