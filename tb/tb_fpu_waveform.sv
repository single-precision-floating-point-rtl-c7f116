// tb_fpu_waveform: replays the operation sequence of the reference
// simulation waveform of this FPU.
//
// That waveform steps fpu_op through add (3'h0) under rounding modes 0, 1, 2,
// 3, then subtract (3'h1) and multiply (3'h2) under modes 0 to 3 each, then
// divide, add, multiply, add, multiply (3'h3, 3'h0, 3'h2, 3'h0, 3'h2) in
// mode 0, with the ine, inf, underflow, zero and div_by_zero flags each
// raised at some point.  Its operand values cannot be read, so this test
// runs its own: each segment holds its operation and mode for eight clocks
// of operands picked to raise those flags (cancellation to zero, tiny
// products, a division by zero, overflow to infinity) among ordinary
// values.  Results are checked against fpu_ref_pkg four clocks after issue,
// and the test fails if any of the five flags never rose.
module tb_fpu_waveform;
  import fpu_ref_pkg::*;

  localparam int LAT = 4;

  logic        clk = 1'b0;
  logic [2:0]  fpu_op;
  logic [1:0]  rmode;
  logic [31:0] opa, opb;
  logic [31:0] fpout;
  logic        zero, ine, overflow, underflow, inf, qnan, snan, div_by_zero;

  fpu dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_ine = 0, n_inf = 0, n_unf = 0, n_zero = 0, n_dbz = 0;
  ref_out_t pipe [LAT+1];
  logic     pvalid [LAT+1];

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // operand pair k of a segment for operation op
  task automatic pick(input logic [2:0] op, input int k, output logic [31:0] a, output logic [31:0] b);
    a = {1'($urandom), 8'($urandom_range(110, 144)), 23'($urandom)};
    b = {1'($urandom), 8'($urandom_range(110, 144)), 23'($urandom)};
    case ({op, 3'(k)})
      {3'd0, 3'd1}: b = a ^ 32'h80000000;                   // a + (-a) = 0
      {3'd1, 3'd1}: b = a;                                  // a - a = 0
      {3'd2, 3'd2}: begin a = 32'h0C000001; b = 32'h32800003; end // tiny product
      {3'd2, 3'd3}: begin a = 32'h7E000000; b = 32'h42000000; end // overflow
      {3'd3, 3'd2}: b = 32'h00000000;                       // division by zero
      {3'd3, 3'd3}: begin a = 32'h00400000; b = 32'h4F000000; end // tiny quotient
      default: ;
    endcase
  endtask

  typedef struct { logic [2:0] op; logic [1:0] rm; } seg_t;
  seg_t segs [17];

  initial begin
    logic [31:0] a, b;
    foreach (pvalid[i]) pvalid[i] = 1'b0;
    for (int r = 0; r < 4; r++) begin
      segs[r]     = '{3'd0, 2'(r)};
      segs[4 + r] = '{3'd1, 2'(r)};
      segs[8 + r] = '{3'd2, 2'(r)};
    end
    segs[12] = '{3'd3, 2'd0};
    segs[13] = '{3'd0, 2'd0};
    segs[14] = '{3'd2, 2'd0};
    segs[15] = '{3'd0, 2'd0};
    segs[16] = '{3'd2, 2'd0};

    for (int s = 0; s < 17 + 1; s++) begin
      for (int k = 0; k < 8; k++) begin
        if (s < 17) begin
          pick(segs[s].op, k, a, b);
          fpu_op = segs[s].op;
          rmode  = segs[s].rm;
          opa    = a;
          opb    = b;
        end
        @(posedge clk);
        // shift the expectation pipeline at the edge the operands were latched
        for (int i = LAT; i > 0; i--) begin pipe[i] = pipe[i-1]; pvalid[i] = pvalid[i-1]; end
        pipe[0]   = fpu_model(fpu_op, rmode, opa, opb);
        pvalid[0] = (s < 17);
        #1;
        // outputs now belong to the operation latched LAT edges earlier
        if (pvalid[LAT]) begin
          checks++;
          if ({fpout, zero, ine, overflow, underflow, inf, qnan, snan, div_by_zero} !==
              {pipe[LAT].result, pipe[LAT].zero, pipe[LAT].ine, pipe[LAT].overflow,
               pipe[LAT].underflow, pipe[LAT].inf, pipe[LAT].qnan, pipe[LAT].snan,
               pipe[LAT].div_by_zero}) begin
            failures++;
            $display("MISMATCH: got %h, want %h", fpout, pipe[LAT].result);
          end
          n_ine  += int'(ine);
          n_inf  += int'(inf);
          n_unf  += int'(underflow);
          n_zero += int'(zero);
          n_dbz  += int'(div_by_zero);
        end
      end
    end
    if (checks != 17 * 8) begin
      failures++;
      $display("unexpected number of checks %0d", checks);
    end
    if (n_ine == 0 || n_inf == 0 || n_unf == 0 || n_zero == 0 || n_dbz == 0) begin
      failures++;
      $display("flag never raised: ine %0d inf %0d underflow %0d zero %0d div_by_zero %0d",
               n_ine, n_inf, n_unf, n_zero, n_dbz);
    end
    $display("ine %0d inf %0d underflow %0d zero %0d div_by_zero %0d", n_ine, n_inf, n_unf, n_zero, n_dbz);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
