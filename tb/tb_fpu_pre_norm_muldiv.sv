// tb_fpu_pre_norm_muldiv: checks pre-normalization for multiply and divide.
//
// Random operand pairs with many subnormals.  For each nonzero operand the
// testbench finds the position p of the leading one of its significand M and
// expects the fraction M shifted so that this one sits at bit 23, with
// exponent max(e,1) - (23 - p).  The result exponent, as the 10-bit two's
// complement {exp_ovf, exp_out}, must be eA + eB - 127 for a multiply and
// eA - eB + 127 for a divide; underflow, inf, sign and sign_exe are checked
// against their definitions.  Outputs are checked one clock after the inputs.
module tb_fpu_pre_norm_muldiv;
  logic        clk = 1'b0;
  logic [2:0]  fpu_op;
  logic [31:0] opa, opb;
  logic [7:0]  exp_out;
  logic [1:0]  exp_ovf;
  logic [23:0] fracta, fractb;
  logic [2:0]  underflow;
  logic        inf, sign, sign_exe;

  fpu_pre_norm_muldiv dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] pick();
    logic [31:0] v = $urandom;
    case ($urandom_range(0, 5))
      0: v[30:23] = '0;
      1: v[30:0] = {8'h00, 23'h1 << $urandom_range(0, 22)};
      2: v[30:0] = {8'hFF, 23'h0};
      3: v[30:0] = '0;
      default: ;
    endcase
    return v;
  endfunction

  task automatic norm(input logic [31:0] v, output logic [23:0] f, output int e);
    int p = -1;
    logic [23:0] m = {v[30:23] != 0, v[22:0]};
    for (int i = 0; i < 24; i++) if (m[i]) p = i;
    e = (v[30:23] == 0) ? 1 : int'(v[30:23]);
    if (p < 0) begin f = '0; return; end
    f = m << (23 - p);
    e = e - (23 - p);
  endtask

  logic [23:0] fa, fb;
  int xa, xb, xe;
  logic [9:0] got_e;
  int n_neg = 0;

  initial begin
    for (int i = 0; i < 20000; i++) begin
      opa = pick();
      opb = pick();
      fpu_op = ($urandom_range(0, 1) == 1) ? 3'd3 : 3'd2;
      @(posedge clk);
      #1;
      norm(opa, fa, xa);
      norm(opb, fb, xb);
      xe = (fpu_op == 3'd3) ? xa - xb + 127 : xa + xb - 127;
      got_e = {exp_ovf, exp_out};
      if (xe < 0) n_neg++;
      checks++;
      if (fracta !== fa || fractb !== fb || $signed(got_e) != xe ||
          underflow !== {xe < 1, opb[30:23] == 0 && opb[22:0] != 0, opa[30:23] == 0 && opa[22:0] != 0} ||
          inf !== ((opa[30:0] == {8'hFF, 23'h0}) || (opb[30:0] == {8'hFF, 23'h0})) ||
          sign !== (opa[31] ^ opb[31]) || sign_exe !== (opa[31] & opb[31])) begin
        failures++;
        if (failures < 10)
          $display("MISMATCH a=%h b=%h op=%0d: %h %h e=%0d uf=%b want %h %h e=%0d",
                   opa, opb, fpu_op, fracta, fractb, $signed(got_e), underflow, fa, fb, xe);
      end
    end
    if (n_neg == 0) begin failures++; $display("no negative exponent"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
