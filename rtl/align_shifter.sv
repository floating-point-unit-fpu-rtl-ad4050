// align_shifter: logical right barrel shifter that aligns the addend.
//
// The 24-bit addend significand is placed at bits 97..74 of a 99-bit field
// and shifted right by shamt (0..127) through seven 2:1 multiplexer stages
// (shifts of 1, 2, 4, ... 64), the barrel structure used for the design's
// shifters. Vacated bits fill with 0; only logical shifts are needed. Output
// bits 98..22 are the window the adder sees; bits 21..0 plus any addend bits
// shifted out of the field entirely form the sticky bit. Combinational.
//
// Ports: sig (addend significand), shamt, win (77-bit aligned addend),
// sticky (OR of every addend bit below the window).
module align_shifter
  import fma_pkg::*;
(
  input  logic [SIG_W-1:0]   sig,
  input  logic [SH_W-1:0]    shamt,
  output logic [WIN_W-1:0]   win,
  output logic               sticky
);
  localparam int unsigned LOW_W = ALIGN_W - WIN_W;       // 22 bits below window
  localparam int unsigned TOP   = ALIGN_W - 2;           // 97: MSB position

  logic [ALIGN_W-1:0] stage [SH_W+1];
  logic [SIG_W-1:0]   lost_mask;
  logic               lost;

  always_comb begin
    stage[0] = ALIGN_W'(sig) << (TOP - SIG_W + 1);
    for (int unsigned s = 0; s < SH_W; s++)
      stage[s+1] = shamt[s] ? (stage[s] >> (1 << s)) : stage[s];
    win = stage[SH_W][ALIGN_W-1:LOW_W];

    // Bits shifted past bit 0 of the field: significand bit k sits at
    // TOP-SIG_W+1+k = 74+k before the shift, so it is lost when k < shamt-74.
    for (int unsigned k = 0; k < SIG_W; k++)
      lost_mask[k] = (int'(shamt) - int'(TOP - SIG_W + 1)) > int'(k);
    lost   = |(sig & lost_mask);
    sticky = (|stage[SH_W][LOW_W-1:0]) | lost;
  end
endmodule
