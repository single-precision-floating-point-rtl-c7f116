// fpu_ref_pkg: golden model of IEEE 754 single precision add, subtract,
// multiply and divide for the FPU testbenches.
//
// The model works on exact wide integers rather than on the RTL's datapath:
// an operand is M * 2^(e-150) with M its 24-bit significand, a sum is formed
// exactly on a 2^-149 grid, a product exactly as Ma*Mb, and a quotient as
// floor(Ma * 2^80 / Mb) with a sticky remainder.  round_exact() then rounds
// the exact value (-1)^s * N * 2^P to single precision in any of the four
// modes and derives the flags (inexact, overflow, underflow with tininess
// before rounding, infinity, zero).  Special operands follow IEEE 754, with
// the canonical quiet NaN 0x7FC00000 as the only NaN result.
package fpu_ref_pkg;

  typedef struct packed {
    logic [31:0] result;
    logic        zero;
    logic        ine;
    logic        overflow;
    logic        underflow;
    logic        inf;
    logic        qnan;
    logic        snan;
    logic        div_by_zero;
  } ref_out_t;

  localparam int NW = 320;

  // Round (-1)^s * (n + sticky fraction) * 2^p to single precision.
  function automatic ref_out_t round_exact(input logic s, input logic [NW-1:0] n,
                                           input int p, input logic st, input logic [1:0] rm);
    ref_out_t o;
    int lead, lsbw, sh, field;
    logic [NW-1:0] kept;
    logic guard, sticky, inc, to_inf;
    o = '0;
    lead = -1;
    for (int i = 0; i < NW; i++) if (n[i]) lead = i;
    if (lead < 0) begin
      // exact zero (a nonzero sticky alone never happens in the callers)
      o.result = {s, 31'b0};
      o.zero   = 1'b1;
      return o;
    end
    lsbw = (lead + p >= -126) ? lead + p - 23 : -149;
    sh = lsbw - p;
    guard = 1'b0;
    sticky = st;
    if (sh <= 0) begin
      kept = n << (-sh);
    end else begin
      kept  = n >> sh;
      guard = n[sh-1];
      for (int i = 0; i < sh - 1; i++) sticky = sticky | n[i];
    end
    case (rm)
      2'd0: inc = guard & (sticky | kept[0]);
      2'd1: inc = 1'b0;
      2'd2: inc = !s & (guard | sticky);
      default: inc = s & (guard | sticky);
    endcase
    kept = kept + NW'(inc);
    if (kept == (NW'(1) << 24)) begin
      kept = NW'(1) << 23;
      lsbw = lsbw + 1;
    end
    field  = (kept >= (NW'(1) << 23)) ? lsbw + 150 : 0;
    to_inf = (rm == 2'd0) || (rm == 2'd2 && !s) || (rm == 2'd3 && s);
    o.ine       = guard | sticky;
    o.underflow = (lead + p < -126) && o.ine;
    if (field >= 255) begin
      o.overflow = 1'b1;
      o.ine      = 1'b1;
      o.inf      = to_inf;
      o.result   = to_inf ? {s, 8'hFF, 23'h0} : {s, 8'hFE, 23'h7FFFFF};
    end else begin
      o.result = {s, field[7:0], kept[22:0]};
    end
    o.zero = (o.result[30:0] == '0);
    return o;
  endfunction

  function automatic ref_out_t fpu_model(input logic [2:0] op, input logic [1:0] rm,
                                         input logic [31:0] a, input logic [31:0] b);
    ref_out_t o;
    logic sa, sb, sbe, sp;
    int ea, eb;
    logic [NW-1:0] ma, mb, na, nb, n, q, r;
    logic nan_a, nan_b, inf_a, inf_b, zero_a, zero_b;
    sa = a[31];
    sb = b[31];
    sbe = sb ^ (op == 3'd1);
    sp = sa ^ sb;
    nan_a  = (a[30:23] == 8'hFF) && (a[22:0] != 0);
    nan_b  = (b[30:23] == 8'hFF) && (b[22:0] != 0);
    inf_a  = (a[30:23] == 8'hFF) && (a[22:0] == 0);
    inf_b  = (b[30:23] == 8'hFF) && (b[22:0] == 0);
    zero_a = (a[30:0] == 0);
    zero_b = (b[30:0] == 0);
    ea = (a[30:23] == 0) ? 1 : int'(a[30:23]);
    eb = (b[30:23] == 0) ? 1 : int'(b[30:23]);
    ma = NW'({a[30:23] != 0, a[22:0]});
    mb = NW'({b[30:23] != 0, b[22:0]});
    o = '0;

    if (op > 3'd3 || nan_a || nan_b
        || (op <= 3'd1 && inf_a && inf_b && sa != sbe)
        || (op == 3'd2 && ((inf_a && zero_b) || (zero_a && inf_b)))
        || (op == 3'd3 && ((zero_a && zero_b) || (inf_a && inf_b)))) begin
      o.result = 32'h7FC00000;
      o.qnan = 1'b1;
    end else if (op <= 3'd1 && (inf_a || inf_b)) begin
      o.result = {inf_a ? sa : sbe, 8'hFF, 23'h0};
      o.inf = 1'b1;
    end else if (op == 3'd2 && (inf_a || inf_b)) begin
      o.result = {sp, 8'hFF, 23'h0};
      o.inf = 1'b1;
    end else if (op == 3'd3 && (inf_a || zero_b)) begin
      o.result = {sp, 8'hFF, 23'h0};
      o.inf = 1'b1;
      o.div_by_zero = zero_b;
    end else if (op >= 3'd2 && (zero_a || zero_b || inf_b)) begin
      o.result = {sp, 31'h0};
      o.zero = 1'b1;
    end else if (op <= 3'd1) begin
      na = ma << (ea - 1);
      nb = mb << (eb - 1);
      if (sa == sbe) o = round_exact(sa, na + nb, -149, 1'b0, rm);
      else if (na > nb) o = round_exact(sa, na - nb, -149, 1'b0, rm);
      else if (nb > na) o = round_exact(sbe, nb - na, -149, 1'b0, rm);
      else o = round_exact(rm == 2'd3, '0, -149, 1'b0, rm);
    end else if (op == 3'd2) begin
      o = round_exact(sp, ma * mb, ea + eb - 300, 1'b0, rm);
    end else begin
      n = ma << 80;
      q = n / mb;
      r = n % mb;
      o = round_exact(sp, q, ea - eb - 80, r != 0, rm);
    end
    o.snan = (nan_a && !a[22]) || (nan_b && !b[22]);
    return o;
  endfunction

endpackage
