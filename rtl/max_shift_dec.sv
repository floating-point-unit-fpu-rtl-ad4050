// max_shift_dec: decodes the largest normalization shift the result exponent
// allows into a one-hot vector M (max_shift_dec, the decoded ExpBase of the LZA).
//
// A left shift of L gives window bit 76 the biased exponent ExpBase - L. The
// exponent may not fall below 1 (the denormal exponent), so L <= ExpBase - 1.
// M has a single 1 at window position 77 - ExpBase; ORed into the edge vector,
// it makes the leading-zero detector stop there, which produces a denormal
// result instead of over-shifting. The LZD reads window bits 76..1 only, so
// M needs the 76 positions 76..1, i.e. ExpBase 1..76; for ExpBase = 77 the
// limit is the LZD's own maximum count of 76, and M[0] is tied to 0. Each of
// the 76 bits is one 7-bit code_decoder on ExpBase[6:0] (code 77 - i), gated
// by a shared test that ExpBase lies in 0..127. When ExpBase > 76 every shift
// is allowed and M is all zeros; ExpBase < 1 is handled as an underflow by
// the exception logic, and M is then all zeros too. One 7-bit decoder output
// per M bit follows the relay design; the range gate is this design's.
// Combinational.
module max_shift_dec
  import fma_pkg::*;
(
  input  exp_t             exp_base,
  output logic [WIN_W-1:0] m
);
  localparam int unsigned CW = 7;               // code width of each decoder

  logic            in_range;                    // 0 <= exp_base <= 127
  logic [CW-1:0]   code;

  assign in_range = (exp_base[$bits(exp_t)-1:CW] == '0);
  assign code     = exp_base[CW-1:0];
  assign m[0]     = 1'b0;

  for (genvar i = 1; i < int'(WIN_W); i++) begin : g_dec
    logic hit;
    code_decoder #(.N(CW), .CODE(CW'(int'(WIN_W) - i))) u_dec (
      .x   (code),
      .hit (hit)
    );
    assign m[i] = hit & in_range;
  end
endmodule
