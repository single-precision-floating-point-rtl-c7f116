// tb_fpu_mul: checks the significand multiplier.
//
// Random 24-bit fractions (normalized and arbitrary), exponents and signs;
// the product is recomputed with 64-bit integers and must appear in
// sig[49:2] one clock later, with exponent and sign passed through and no
// sticky bit.
module tb_fpu_mul;
  import fpu_pkg::*;
  logic        clk = 1'b0;
  logic [23:0] fracta, fractb;
  xexp_t       exp_in;
  logic        sign_in;
  unrounded_t  res;

  fpu_mul dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint unsigned p;

  initial begin
    for (int i = 0; i < 20000; i++) begin
      fracta  = 24'($urandom) | (i[0] ? 24'h800000 : 24'h0);
      fractb  = 24'($urandom) | (i[0] ? 24'h800000 : 24'h0);
      if (i < 4) begin fracta = 24'hFFFFFF; fractb = (i < 2) ? 24'hFFFFFF : 24'h800000; end
      exp_in  = xexp_t'($urandom);
      sign_in = 1'($urandom);
      @(posedge clk);
      #1;
      p = longint'(fracta) * longint'(fractb);
      checks++;
      if (res.sig !== {48'(p), 2'b00} || res.exp !== exp_in || res.sign !== sign_in ||
          res.sticky !== 1'b0) begin
        failures++;
        if (failures < 10) $display("MISMATCH %h * %h = %h want %h", fracta, fractb, res.sig, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
