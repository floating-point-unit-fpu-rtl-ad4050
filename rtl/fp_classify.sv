// fp_classify: unpacks one IEEE-754 single-precision operand and classifies it.
//
// Decoding follows the number format: an exponent of all zeros with a zero
// fraction is zero, with a nonzero fraction a denormal; an exponent of all ones
// is infinity (zero fraction) or NaN (nonzero fraction; signalling when the
// fraction MSB is 0). The significand gets its hidden 1 only for normal
// numbers, and denormals use the effective exponent 1, so the rest of the
// datapath treats both alike. The three detectors are single decoder
// outputs (code_decoder): exponent code 0, exponent code 255 (8 bits each)
// and fraction code 0 (23 bits), as in the relay design's exception logic.
// Purely combinational.
//
// Ports: x (the operand); sig (24-bit significand), eff_exp (effective biased
// exponent), cls (class flags).
module fp_classify
  import fma_pkg::*;
(
  input  fp32_t              x,
  output logic [SIG_W-1:0]   sig,
  output logic [EXP_W-1:0]   eff_exp,
  output fp_class_t          cls
);
  logic exp_zero, exp_ones, frac_zero;

  code_decoder #(.N(EXP_W),  .CODE('0)) u_exp_zero  (.x(x.exp),  .hit(exp_zero));
  code_decoder #(.N(EXP_W),  .CODE('1)) u_exp_ones  (.x(x.exp),  .hit(exp_ones));
  code_decoder #(.N(FRAC_W), .CODE('0)) u_frac_zero (.x(x.frac), .hit(frac_zero));

  always_comb begin
    cls.is_zero   = exp_zero & frac_zero;
    cls.is_denorm = exp_zero & ~frac_zero;
    cls.is_inf    = exp_ones & frac_zero;
    cls.is_nan    = exp_ones & ~frac_zero;
    cls.is_snan   = exp_ones & ~frac_zero & ~x.frac[FRAC_W-1];

    sig     = {~exp_zero, x.frac};
    eff_exp = exp_zero ? EXP_W'(1) : x.exp;
  end
endmodule
