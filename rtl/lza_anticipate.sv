// lza_anticipate: anticipation logic of the leading-zero anticipator (LZA).
//
// Bitwise logic on the propagate/generate/kill terms of the main adder
// (operands x and y' = y or ~y) builds an edge vector V whose leading one is
// at the result's leading one or one position above it, before the sum is
// known. Each bit looks only at its own P and its lower neighbour:
//   effective addition         V[i] = ~K[i-1]           (x | y one bit lower)
//   subtraction, x > y         V[i] = ~P[i] & ~K[i-1]
//   subtraction, y > x         V[i] = ~P[i] & ~G[i-1]
// and the decoded shift limit M is ORed in: V[i] |= M[i]. The sticky bit acts
// as the digit below bit 0 (K[-1] = G[-1] = sticky). The published
// per-bit equation is a three-input XOR of P and G terms ORed with M; the
// indicator above is a derivation of the same bitwise idea that this
// implementation uses because it bounds the error to one position, which a
// single extra 1-bit shift after normalization corrects. Combinational.
module lza_anticipate
  import fma_pkg::*;
(
  input  logic [WIN_W-1:0] p,       // from the adder with x and y'
  input  logic [WIN_W-1:0] g,
  input  logic [WIN_W-1:0] k,
  input  logic             sub,     // effective subtraction
  input  logic             neg,     // x < y (result taken from y - x)
  input  logic             sticky,  // bits below the window (subtrahend)
  input  logic [WIN_W-1:0] m,       // max_shift_dec
  output logic [WIN_W-1:0] v
);
  logic [WIN_W-1:0] k_add;        // K of the bit below, nothing below bit 0
  logic [WIN_W-1:0] k_lo, g_lo;   // K and G of the bit below

  always_comb begin
    k_add = {k[WIN_W-2:0], 1'b1};
    k_lo = {k[WIN_W-2:0], sticky};
    g_lo = {g[WIN_W-2:0], sticky};
    for (int unsigned i = 0; i < WIN_W; i++) begin
      if (!sub)
        v[i] = ~k_add[i];
      else if (!neg)
        v[i] = ~p[i] & ~k_lo[i];
      else
        v[i] = ~p[i] & ~g_lo[i];
    end
    v = v | m;
  end
endmodule
