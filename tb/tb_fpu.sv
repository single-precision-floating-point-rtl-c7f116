// tb_fpu: end-to-end testbench of the pipelined FPU at its default size.
//
// Issues one operation on every clock: first a set of hand-computed vectors,
// then random operands of every class (normal, subnormal, zero, infinity,
// quiet and signalling NaN, near-equal pairs for cancellation, extreme
// exponents for overflow and underflow) with random operation and rounding
// mode.  Each operation's expected result and flags come from the
// independent integer model in fpu_ref_pkg and are compared with the outputs
// exactly four clocks after the operation was latched (and no output may
// ever be a signalling NaN), which also
// checks the latency and the one-per-clock rate.  It counts how often each
// mechanism of the design occurred and fails if one never did.
module tb_fpu;
  import fpu_ref_pkg::*;

  localparam int LAT      = 4;
  localparam int N_RANDOM = 200000;

  logic        clk = 1'b0;
  logic [2:0]  fpu_op;
  logic [1:0]  rmode;
  logic [31:0] opa, opb;
  logic [31:0] fpout;
  logic        zero, ine, overflow, underflow, inf, qnan, snan, div_by_zero;

  fpu dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;

  // Expected outputs, indexed by issue cycle.
  ref_out_t exp_q [$];
  logic     exp_have [$];
  logic     exp_known [$];
  logic [31:0] exp_const [$];   // hand-computed result, where known

  // mechanism counters
  int n_op [8];
  int n_rm [4];
  int n_ovf, n_unf, n_ine, n_inf, n_qnan, n_snan, n_dbz, n_zero, n_subn, n_cancel_zero, n_exact;

  initial begin
    repeat (N_RANDOM + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] rand_operand(input logic [31:0] other);
    logic [31:0] v;
    int k;
    v = $urandom;
    k = $urandom_range(0, 15);
    case (k)
      0: v[30:0] = '0;                                   // zero
      1: v[30:23] = 8'h00;                               // subnormal
      2: v[30:0] = {8'hFF, 23'h0};                       // infinity
      3: v[30:22] = {8'hFF, 1'b1};                       // quiet NaN
      4: begin v[30:22] = {8'hFF, 1'b0}; if (v[21:0] == 0) v[0] = 1'b1; end // signalling NaN
      5: v[30:23] = 8'(240 + $urandom_range(0, 14));     // huge
      6: v[30:23] = 8'($urandom_range(1, 20));           // tiny
      7: v[30:0] = other[30:0] ^ 31'($urandom_range(0, 3)); // near the other operand
      8: v[30:23] = other[30:23] + 8'($urandom_range(0, 3) - 1);
      9: v[30:23] = 8'($urandom_range(100, 154));        // moderate
      default: if (v[30:23] == 8'hFF) v[30:23] = 8'h80;  // plain normal
    endcase
    return v;
  endfunction

  task automatic issue(input logic [2:0] op, input logic [1:0] rm, input logic [31:0] a,
                       input logic [31:0] b, input logic known, input logic [31:0] cval);
    fpu_op = op;
    rmode  = rm;
    opa    = a;
    opb    = b;
    exp_q.push_back(fpu_model(op, rm, a, b));
    exp_have.push_back(1'b1);
    exp_known.push_back(known);
    exp_const.push_back(cval);
    @(posedge clk);
    #1;
  endtask

  // Compare the outputs with the operation issued LAT clocks before.
  always @(posedge clk) begin
    ref_out_t e;
    int idx;
    cycle <= cycle + 1;
    #2;
    idx = cycle - LAT - 1;
    if (idx >= 0 && idx < exp_q.size() && exp_have[idx]) begin
      e = exp_q[idx];
      checks++;
      if (fpout !== e.result || zero !== e.zero || ine !== e.ine || overflow !== e.overflow ||
          underflow !== e.underflow || inf !== e.inf || qnan !== e.qnan || snan !== e.snan ||
          div_by_zero !== e.div_by_zero) begin
        failures++;
        if (failures < 20)
          $display("MISMATCH #%0d: got %h z%b i%b o%b u%b inf%b q%b s%b d%b, want %h z%b i%b o%b u%b inf%b q%b s%b d%b",
                   idx, fpout, zero, ine, overflow, underflow, inf, qnan, snan, div_by_zero,
                   e.result, e.zero, e.ine, e.overflow, e.underflow, e.inf, e.qnan, e.snan, e.div_by_zero);
      end
      if (exp_known[idx]) begin
        checks++;
        if (e.result !== exp_const[idx] || fpout !== exp_const[idx]) begin
          failures++;
          $display("VECTOR #%0d: got %h, model %h, want %h", idx, fpout, e.result, exp_const[idx]);
        end
      end
      // the unit must never put out a signalling NaN
      checks++;
      if (fpout[30:23] == 8'hFF && fpout[22:0] != 0 && !fpout[22]) begin
        failures++;
        $display("signalling NaN on the output: %h", fpout);
      end
      // mechanism counts (from the observed, checked outputs)
      n_ovf  += int'(overflow);
      n_unf  += int'(underflow);
      n_ine  += int'(ine);
      n_inf  += int'(inf);
      n_qnan += int'(qnan);
      n_snan += int'(snan);
      n_dbz  += int'(div_by_zero);
      n_zero += int'(zero);
      n_subn += int'(fpout[30:23] == 0 && fpout[22:0] != 0);
      n_exact += int'(!ine && !qnan && !inf && !zero);
    end
  end

  logic [31:0] a, b;
  logic [2:0]  op;
  logic [1:0]  rm;

  initial begin
    fpu_op = '0; rmode = '0; opa = '0; opb = '0;
    // Outputs of the first LAT clocks belong to no operation.
    @(posedge clk); #1;
    // cycle counter: the operation issued before edge number c is checked after edge c+LAT
    exp_q.push_back('0); exp_have.push_back(1'b0); exp_known.push_back(1'b0); exp_const.push_back('0);

    // hand-computed vectors
    issue(3'd0, 2'd0, 32'h3F800000, 32'h3F800000, 1, 32'h40000000); // 1 + 1 = 2
    issue(3'd0, 2'd0, 32'h3FC00000, 32'h40100000, 1, 32'h40700000); // 1.5 + 2.25 = 3.75
    issue(3'd1, 2'd0, 32'h3F800000, 32'h3F800000, 1, 32'h00000000); // 1 - 1 = +0
    issue(3'd1, 2'd3, 32'h3F800000, 32'h3F800000, 1, 32'h80000000); // 1 - 1 = -0 rounding down
    issue(3'd2, 2'd0, 32'h40400000, 32'h3F000000, 1, 32'h3FC00000); // 3 * 0.5 = 1.5
    issue(3'd2, 2'd0, 32'hC0000000, 32'h40400000, 1, 32'hC0C00000); // -2 * 3 = -6
    issue(3'd3, 2'd0, 32'h3F800000, 32'h40400000, 1, 32'h3EAAAAAB); // 1/3 nearest
    issue(3'd3, 2'd1, 32'h3F800000, 32'h40400000, 1, 32'h3EAAAAAA); // 1/3 toward zero
    issue(3'd3, 2'd2, 32'h3F800000, 32'h40400000, 1, 32'h3EAAAAAB); // 1/3 up
    issue(3'd3, 2'd3, 32'hBF800000, 32'h40400000, 1, 32'hBEAAAAAB); // -1/3 down
    issue(3'd2, 2'd0, 32'h7F7FFFFF, 32'h40000000, 1, 32'h7F800000); // max*2 overflows to inf
    issue(3'd2, 2'd1, 32'h7F7FFFFF, 32'h40000000, 1, 32'h7F7FFFFF); // ... or to max
    issue(3'd3, 2'd0, 32'h3F800000, 32'h00000000, 1, 32'h7F800000); // 1/0
    issue(3'd2, 2'd0, 32'h00800000, 32'h3F000000, 1, 32'h00400000); // 2^-126 * 0.5 subnormal
    issue(3'd0, 2'd0, 32'h00000001, 32'h00000001, 1, 32'h00000002); // subnormal sum
    issue(3'd2, 2'd0, 32'h00000001, 32'h3F000000, 1, 32'h00000000); // ties to even gives 0
    issue(3'd2, 2'd2, 32'h00000001, 32'h3F000000, 1, 32'h00000001); // rounding up gives 2^-149
    issue(3'd0, 2'd0, 32'h4B7FFFFF, 32'h3F800000, 1, 32'h4B800000); // carry into exponent
    issue(3'd0, 2'd2, 32'h3F800000, 32'h0D800000, 1, 32'h3F800001); // 1 + tiny rounded up
    issue(3'd1, 2'd1, 32'h3F800000, 32'h0D800000, 1, 32'h3F7FFFFF); // 1 - tiny toward zero
    issue(3'd2, 2'd0, 32'h7F800000, 32'h00000000, 1, 32'h7FC00000); // inf * 0
    issue(3'd0, 2'd0, 32'h7F800001, 32'h3F800000, 1, 32'h7FC00000); // sNaN in, qNaN out

    // random traffic, one operation per clock
    a = 32'h3F800000;
    for (int i = 0; i < N_RANDOM; i++) begin
      b  = rand_operand(a);
      a  = rand_operand(b);
      op = ($urandom_range(0, 99) == 0) ? 3'($urandom_range(4, 7)) : 3'($urandom_range(0, 3));
      rm = 2'($urandom_range(0, 3));
      n_op[op]++;
      n_rm[rm]++;
      if (op <= 3'd1 && a[30:0] == b[30:0] && a[30:23] != 8'hFF && a[30:0] != 0 &&
          ((a[31] ^ b[31]) != (op == 3'd1)))
        n_cancel_zero++;
      issue(op, rm, a, b, 0, '0);
    end
    repeat (LAT + 2) @(posedge clk);

    if (checks != 2 * N_RANDOM + 22 + 22 + 22) begin
      failures++;
      $display("expected %0d checks, got %0d", 2 * N_RANDOM + 66, checks);
    end
    for (int k = 0; k < 4; k++) if (n_op[k] == 0) begin failures++; $display("op %0d never issued", k); end
    for (int k = 0; k < 4; k++) if (n_rm[k] == 0) begin failures++; $display("rmode %0d never used", k); end
    if (n_op[4] + n_op[5] + n_op[6] + n_op[7] == 0) begin failures++; $display("no undefined op code"); end
    if (n_ovf == 0)  begin failures++; $display("no overflow"); end
    if (n_unf == 0)  begin failures++; $display("no underflow"); end
    if (n_ine == 0)  begin failures++; $display("no inexact"); end
    if (n_inf == 0)  begin failures++; $display("no infinity"); end
    if (n_qnan == 0) begin failures++; $display("no qnan"); end
    if (n_snan == 0) begin failures++; $display("no snan"); end
    if (n_dbz == 0)  begin failures++; $display("no divide by zero"); end
    if (n_zero == 0) begin failures++; $display("no zero"); end
    if (n_subn == 0) begin failures++; $display("no subnormal result"); end
    if (n_exact == 0) begin failures++; $display("no exact result"); end
    if (n_cancel_zero == 0) begin failures++; $display("no cancellation to zero"); end
    $display("ops add=%0d sub=%0d mul=%0d div=%0d other=%0d; overflow=%0d underflow=%0d inexact=%0d inf=%0d qnan=%0d snan=%0d div_by_zero=%0d zero=%0d subnormal=%0d exact=%0d cancel=%0d",
             n_op[0], n_op[1], n_op[2], n_op[3], n_op[4]+n_op[5]+n_op[6]+n_op[7], n_ovf, n_unf, n_ine,
             n_inf, n_qnan, n_snan, n_dbz, n_zero, n_subn, n_exact, n_cancel_zero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
