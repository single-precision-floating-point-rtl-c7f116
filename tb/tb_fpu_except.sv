// tb_fpu_except: checks the exceptions unit.
//
// Goes through every pair of operand classes (zero, subnormal, normal,
// infinity, quiet NaN, signalling NaN, each with both signs and random
// payloads) under all eight operation codes.  The expectation comes from
// fpu_model() of fpu_ref_pkg: the unit must claim the operation as special
// exactly when an operand is a NaN or an infinity, when a multiply or divide
// has a zero operand, or when the code is above 3, and must then give the
// model's result and its qnan, inf and div_by_zero flags; snan is checked
// on every operation.
module tb_fpu_except;
  import fpu_pkg::*;
  import fpu_ref_pkg::*;
  logic [2:0]  fpu_op;
  logic [31:0] opa, opb;
  exc_t        exc;

  fpu_except dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] make(input int cls);
    logic [31:0] v = $urandom;
    case (cls)
      0: v[30:0] = '0;
      1: begin v[30:23] = '0; if (v[22:0] == 0) v[0] = 1'b1; end
      2: if (v[30:23] == 0 || v[30:23] == 8'hFF) v[30:23] = 8'h7F;
      3: v[30:0] = {8'hFF, 23'h0};
      4: v[30:22] = {8'hFF, 1'b1};
      default: begin v[30:22] = {8'hFF, 1'b0}; if (v[21:0] == 0) v[1] = 1'b1; end
    endcase
    return v;
  endfunction

  function automatic logic is_inf_or_nan(input logic [31:0] v);
    return v[30:23] == 8'hFF;
  endfunction

  ref_out_t e;
  logic want_special;

  initial begin
    for (int rep = 0; rep < 20; rep++)
      for (int op = 0; op < 8; op++)
        for (int ca = 0; ca < 6; ca++)
          for (int cb = 0; cb < 6; cb++) begin
            fpu_op = 3'(op);
            opa = make(ca);
            opb = make(cb);
            #1;
            e = fpu_model(fpu_op, 2'($urandom), opa, opb);
            want_special = is_inf_or_nan(opa) || is_inf_or_nan(opb) || op > 3 ||
                           (op >= 2 && (opa[30:0] == 0 || opb[30:0] == 0));
            checks++;
            if (exc.special !== want_special || exc.snan !== e.snan ||
                (want_special && (exc.result !== e.result || exc.qnan !== e.qnan ||
                                  exc.inf !== e.inf || exc.div_by_zero !== e.div_by_zero))) begin
              failures++;
              if (failures < 10)
                $display("MISMATCH op=%0d a=%h b=%h: sp%b %h q%b i%b d%b s%b want sp%b %h q%b i%b d%b s%b",
                         op, opa, opb, exc.special, exc.result, exc.qnan, exc.inf, exc.div_by_zero,
                         exc.snan, want_special, e.result, e.qnan, e.inf, e.div_by_zero, e.snan);
            end
            #1;
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
