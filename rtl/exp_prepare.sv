// exp_prepare: exponent preparation of the FMA ("Prepare Exponent").
//
// From the effective biased exponents it computes the addend alignment shift
// d = ea + eb - ec - 100 (the form a_exp + b_exp + offset - c_exp of the FMA architecture; the
// offset value belongs to this implementation's window layout) and the biased
// exponent of window bit 76, ExpBase. When d < 0 and C is nonzero, the addend
// is at least two bits above the whole product: the addend is then left
// unshifted, the product only contributes a sticky bit ("c_dom"), and ExpBase
// is taken from C (ec + 1) instead of the product (ea + eb - 99). The shift is
// clamped to 0..127 (the 7-bit shifter control). Purely combinational.
module exp_prepare
  import fma_pkg::*;
(
  input  logic [EXP_W-1:0] ea,        // effective biased exponents
  input  logic [EXP_W-1:0] eb,
  input  logic [EXP_W-1:0] ec,
  input  logic             c_nonzero, // addend significand is nonzero
  output logic [SH_W-1:0]  shamt,     // alignment right shift of C
  output logic             c_dom,     // addend dominates; product -> sticky
  output exp_t             exp_base   // biased exponent of window bit 76
);
  exp_t d;

  always_comb begin
    d = exp_t'(ea) + exp_t'(eb) - exp_t'(ec) - exp_t'(ALIGN_OFFSET);
    c_dom = c_nonzero && (d < 0);
    if (d < 0)
      shamt = '0;
    else if (d > exp_t'((1 << SH_W) - 1))
      shamt = '1;
    else
      shamt = d[SH_W-1:0];
    exp_base = c_dom ? exp_t'(ec) + exp_t'(1)
                     : exp_t'(ea) + exp_t'(eb) - exp_t'(EXPBASE_OFFSET);
  end
endmodule
