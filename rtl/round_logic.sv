// round_logic: round-to-nearest-even and packing of the normalized result.
//
// Input is the normalized window (bit 76 is the leading significand bit, or
// 0 for a denormal result whose exponent was held at 1), the sticky bit of
// everything below the window and the biased exponent of bit 76. The kept
// significand is bits 76..53, the guard bit is 52 and bits 51..0 join the
// sticky bit. The exponent field and the 23 fraction bits are concatenated
// and incremented as one word when rounding up, so a fraction carry moves
// the exponent up (denormal to normal, or 254 to 255 = infinity) with no
// extra logic; the incremented and the untouched versions are both formed and
// one is selected. An exponent above 254 before rounding gives infinity.
// Only round-to-nearest-even is implemented. Combinational.
module round_logic
  import fma_pkg::*;
(
  input  logic             sign,
  input  logic [WIN_W-1:0] norm,
  input  logic             sticky_in,
  input  exp_t             exp_top,    // biased exponent of norm[76]
  output fp32_t            result,
  output logic             inexact,
  output logic             overflow
);
  localparam int unsigned G_POS = WIN_W - SIG_W - 1;   // 52

  logic [SIG_W-1:0]         sig;
  logic                     guard, sticky, round_up;
  logic [EXP_W-1:0]         expf;
  logic [EXP_W+FRAC_W-1:0]  body, body_inc;

  always_comb begin
    sig      = norm[WIN_W-1 -: SIG_W];
    guard    = norm[G_POS];
    sticky   = (|norm[G_POS-1:0]) | sticky_in;
    round_up = guard & (sticky | sig[0]);
    inexact  = guard | sticky;
    expf     = sig[SIG_W-1] ? exp_top[EXP_W-1:0] : '0;
    body     = {expf, sig[FRAC_W-1:0]};
    body_inc = body + 1'b1;
    overflow = sig[SIG_W-1] && (exp_top > exp_t'(254));
    result.sign = sign;
    if (overflow)
      {result.exp, result.frac} = {8'hFF, 23'h0};
    else
      {result.exp, result.frac} = round_up ? body_inc : body;
    if (result.exp == 8'hFF)
      overflow = 1'b1;
  end
endmodule
