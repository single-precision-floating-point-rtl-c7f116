// tb_fpu_pre_norm_addsub: checks operand ordering and fraction alignment.
//
// For random operand pairs (normal, subnormal, zero, equal and distant
// exponents) it recomputes which operand is the large one (eA > eB picks A,
// otherwise B), the exponent, the signs with subtraction folded into B, and
// the small fraction shifted right by the exponent difference with all
// shifted-out bits ORed into the last bit, using 64-bit integer arithmetic.
// Outputs are checked one clock after the inputs.
module tb_fpu_pre_norm_addsub;
  logic        clk = 1'b0;
  logic [2:0]  fpu_op;
  logic [31:0] opa, opb;
  logic [26:0] frac_l, frac_s;
  logic [7:0]  exp_l;
  logic        sign_l, sign_s;

  fpu_pre_norm_addsub dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] pick(input logic [31:0] other);
    logic [31:0] v = $urandom;
    case ($urandom_range(0, 5))
      0: v[30:0] = '0;
      1: v[30:23] = '0;
      2: v[30:23] = other[30:23] + 8'($urandom_range(0, 30));
      3: v[30:23] = other[30:23];
      default: ;
    endcase
    if (v[30:23] == 8'hFF) v[30:23] = 8'hFE;
    return v;
  endfunction

  longint unsigned ea, eb, ma, mb, el, es, ml, ms, d, sh, lost;
  logic sa, sb, sl, ss;
  logic [26:0] want_s;

  initial begin
    opb = 32'h3F800000;
    for (int i = 0; i < 20000; i++) begin
      opa = pick(opb);
      opb = pick(opa);
      if ($urandom_range(0, 1)) begin logic [31:0] t = opa; opa = opb; opb = t; end
      fpu_op = 3'($urandom_range(0, 1));
      @(posedge clk);
      #1;
      ea = (opa[30:23] == 0) ? 1 : opa[30:23];
      eb = (opb[30:23] == 0) ? 1 : opb[30:23];
      ma = {opa[30:23] != 0, opa[22:0]};
      mb = {opb[30:23] != 0, opb[22:0]};
      sa = opa[31];
      sb = opb[31] ^ fpu_op[0];
      if (ea > eb) begin el = ea; es = eb; ml = ma; ms = mb; sl = sa; ss = sb; end
      else         begin el = eb; es = ea; ml = mb; ms = ma; sl = sb; ss = sa; end
      d = el - es;
      sh = ms << 3;
      if (d >= 40) begin lost = (ms != 0); sh = 0; end
      else begin lost = ((sh & ((64'd1 << d) - 1)) != 0); sh = sh >> d; end
      want_s = 27'(sh) | 27'(lost);
      checks++;
      if (frac_l !== 27'(ml << 3) || frac_s !== want_s || exp_l !== 8'(el) ||
          sign_l !== sl || sign_s !== ss) begin
        failures++;
        if (failures < 10)
          $display("MISMATCH a=%h b=%h op=%0d: l=%h s=%h e=%0d %b%b want l=%h s=%h e=%0d %b%b",
                   opa, opb, fpu_op, frac_l, frac_s, exp_l, sign_l, sign_s,
                   27'(ml << 3), want_s, el, sl, ss);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
