// fma_sp: IEEE-754 single-precision fused multiply-add, out = A * B + C,
// with a single rounding (round to nearest, ties to even), as one
// combinational stage (pipeline depth 0).
//
// Organisation (three sections, as in the FMA architecture the design uses):
//  1. Multiply A x B, prepare exponent, align C. The 24x24 Booth multiplier
//     ((7:3)-counter reduction tree) forms the exact 48-bit product while,
//     in parallel, the addend significand is right-shifted by
//     ea + eb - ec - 100 in a 99-bit barrel shifter. When C is at least two bits above the whole product, C is left
//     unshifted and the product only sets the sticky bit.
//  2. Add and normalize. A Manchester-carry-chain adder forms product +/- C in
//     a 77-bit window; for an effective subtraction a second adder forms the
//     reverse difference and the non-negative one is kept (result_preshift).
//     In parallel, the anticipation logic turns the first adder's P/G/K terms
//     and the decoded exponent limit M (max_shift_dec) into an edge vector
//     whose leading one the 76-bit LZD (five 16-bit tree LZDs) locates. The
//     77-bit left shifter normalizes by that count; the anticipation can be
//     one position short, which a final 1-bit shift corrects unless the
//     exponent limit stopped the shift (denormal result).
//  3. Select output. Round-to-nearest-even with the exponent/fraction
//     incrementer, then the output multiplexer picks the rounded value, NaN,
//     infinity, C itself or a signed zero.
// Denormal inputs and outputs are supported. No exception flags other than
// `inexact` and `overflow` are produced (an implementation choice).
//
// Ports: a, b, c (IEEE-754 singles), result, inexact, overflow (of the
// rounded datapath value; meaningful when the output is not special).
module fma_sp
  import fma_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic [31:0] c,
  output logic [31:0] result,
  output logic        inexact,
  output logic        overflow
);
  fp32_t fa, fb, fc;
  assign fa = a;
  assign fb = b;
  assign fc = c;

  // ---------------- section 1: multiply, prepare exponent, align ----------
  logic [SIG_W-1:0] ma, mb, mc;
  logic [EXP_W-1:0] ea, eb, ec;
  fp_class_t        ca, cb, cc;

  fp_classify u_cls_a (.x(fa), .sig(ma), .eff_exp(ea), .cls(ca));
  fp_classify u_cls_b (.x(fb), .sig(mb), .eff_exp(eb), .cls(cb));
  fp_classify u_cls_c (.x(fc), .sig(mc), .eff_exp(ec), .cls(cc));

  logic sign_p, sub;
  assign sign_p = fa.sign ^ fb.sign;
  assign sub    = sign_p ^ fc.sign;

  logic [PROD_W-1:0] prod;
  booth_mul #(.W(SIG_W)) u_mul (.a(ma), .b(mb), .p(prod));

  logic [SH_W-1:0] shamt;
  logic            c_dom;
  exp_t            exp_base;
  exp_prepare u_exp (
    .ea(ea), .eb(eb), .ec(ec), .c_nonzero(mc != '0),
    .shamt(shamt), .c_dom(c_dom), .exp_base(exp_base)
  );

  logic [WIN_W-1:0] c_win;
  logic             c_sticky;
  align_shifter u_align (.sig(mc), .shamt(shamt), .win(c_win), .sticky(c_sticky));

  // ---------------- section 2: add and normalize ---------------------------
  logic [WIN_W-1:0] x_op, y_op;
  logic             sticky;
  always_comb begin
    x_op   = c_dom ? '0 : (WIN_W'(prod) << PROD_LSB);
    y_op   = c_win;
    sticky = c_dom ? (prod != '0) : c_sticky;
  end

  // main adder: x + y, or x - y - sticky for an effective subtraction
  logic [WIN_W-1:0] sum1, p1, g1, k1;
  logic             cout1;
  mcc_adder #(.W(WIN_W)) u_add_main (
    .x(x_op), .y(sub ? ~y_op : y_op), .cin(sub & ~sticky),
    .sum(sum1), .cout(cout1), .p(p1), .g(g1), .k(k1)
  );

  // reverse subtractor: y - x - sticky, used when x < y
  logic [WIN_W-1:0] sum2, p2, g2, k2;
  logic             cout2;
  mcc_adder #(.W(WIN_W)) u_add_rev (
    .x(y_op), .y(~x_op), .cin(~sticky),
    .sum(sum2), .cout(cout2), .p(p2), .g(g2), .k(k2)
  );

  logic             neg;
  logic [WIN_W-1:0] preshift;
  logic             sign_r;
  always_comb begin
    neg      = sub & ~cout1;
    preshift = neg ? sum2 : sum1;
    sign_r   = neg ? fc.sign : sign_p;
  end

  logic [WIN_W-1:0] m_dec, edge_v;
  max_shift_dec u_msd (.exp_base(exp_base), .m(m_dec));
  lza_anticipate u_lza (
    .p(p1), .g(g1), .k(k1), .sub(sub), .neg(neg), .sticky(sticky),
    .m(m_dec), .v(edge_v)
  );

  logic [SH_W-1:0] lz_cnt, lshift;
  logic            lz_valid;
  lzd76 u_lzd (.b(edge_v[WIN_W-1:1]), .p(lz_cnt), .v(lz_valid));
  assign lshift = lz_valid ? lz_cnt : SH_W'(WIN_W - 1);

  logic [WIN_W-1:0] norm0, norm;
  norm_shifter u_norm (.din(preshift), .shamt(lshift), .dout(norm0));

  // one-position correction of the anticipation
  logic corr;
  exp_t exp_top;
  always_comb begin
    corr    = ~norm0[WIN_W-1] && (exp_t'(lshift) < exp_base - exp_t'(1));
    norm    = corr ? (norm0 << 1) : norm0;
    exp_top = exp_base - exp_t'(lshift) - exp_t'(corr);
  end

  // ---------------- section 3: round and select output ---------------------
  fp32_t rounded;
  round_logic u_round (
    .sign(sign_r), .norm(norm), .sticky_in(sticky), .exp_top(exp_top),
    .result(rounded), .inexact(inexact), .overflow(overflow)
  );

  logic tiny, dp_zero;
  assign tiny    = ~c_dom && (exp_base < exp_t'(1)) && cc.is_zero;
  assign dp_zero = (preshift == '0) && ~sticky;

  out_sel_e sel;
  fp32_t    res_f;
  special_select u_sel (
    .ca(ca), .cb(cb), .cc(cc), .sign_p(sign_p), .c(fc),
    .tiny(tiny), .dp_zero(dp_zero), .rounded(rounded),
    .sel(sel), .result(res_f)
  );
  assign result = res_f;
endmodule
