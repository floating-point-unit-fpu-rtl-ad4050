// special_select: exception logic and output multiplexer of the FMA.
//
// Decides, from the operand classes and a few datapath flags, which of the
// output candidates is the result, then passes it through an 8:1
// multiplexer tree (mux_tree) whose unused inputs are tied to the NaN
// constant:
//   quiet NaN   - any NaN operand, inf * 0, or inf - inf between product and C
//   infinity    - infinite product (sign of A*B) or infinite C (sign of C)
//   addend C    - A or B is zero and C is nonzero (A*B + C = C exactly)
//   signed zero - A*B and C both zero: -0 only if both are negative zeros;
//                 A*B nonzero but below half the smallest denormal and C zero:
//                 zero with the product's sign; exact cancellation in the
//                 datapath: +0
//   rounded     - the normal datapath result otherwise
// NaN results are the canonical quiet NaN 0x7FC00000 (an implementation
// choice). Combinational.
module special_select
  import fma_pkg::*;
(
  input  fp_class_t ca,
  input  fp_class_t cb,
  input  fp_class_t cc,
  input  logic      sign_p,     // sign of A*B
  input  fp32_t     c,
  input  logic      tiny,       // product far below the denormal range, C = 0
  input  logic      dp_zero,    // datapath sum is exactly zero
  input  fp32_t     rounded,
  output out_sel_e  sel,
  output logic [31:0] result
);
  logic        prod_inf, prod_zero, nan, sign_inf, sign_zero;
  logic [31:0] cand [8];

  always_comb begin
    prod_inf  = ca.is_inf | cb.is_inf;
    prod_zero = ca.is_zero | cb.is_zero;
    nan = ca.is_nan | cb.is_nan | cc.is_nan
        | (ca.is_inf & cb.is_zero) | (ca.is_zero & cb.is_inf)
        | (prod_inf & cc.is_inf & (sign_p != c.sign));

    if (nan)                     sel = SEL_QNAN;
    else if (prod_inf | cc.is_inf) sel = SEL_INF;
    else if (prod_zero)          sel = cc.is_zero ? SEL_ZERO : SEL_ADDEND;
    else if (tiny | dp_zero)     sel = SEL_ZERO;
    else                         sel = SEL_ROUNDED;

    sign_inf  = prod_inf ? sign_p : c.sign;
    sign_zero = prod_zero ? (sign_p & c.sign) : (tiny & sign_p);
    cand[SEL_ROUNDED] = rounded;
    cand[SEL_QNAN]    = QNAN;
    cand[SEL_INF]     = {sign_inf, 8'hFF, 23'h0};
    cand[SEL_ADDEND]  = c;
    cand[SEL_ZERO]    = {sign_zero, 31'h0};
    for (int i = 5; i < 8; i++)
      cand[i] = QNAN;                 // unused codes: constant NaN
  end

  mux_tree #(.N(8), .W(32)) u_out_mux (.din(cand), .sel(sel), .dout(result));
endmodule
