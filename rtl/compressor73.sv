// compressor73: a row of (7:3) counters, the building block of the
// multiplier's partial-product reduction.
//
// At every bit position the seven input bits are counted and the 3-bit count
// is returned as three rows: s (weight 1), c1 (weight 2, already moved up one
// position) and c2 (weight 4, moved up two positions), so that
// s + c1 + c2 equals the sum of the seven input rows modulo 2^W. Each counter
// is built from four full adders: two add three inputs each, a third adds
// their sums and the seventh input, and the fourth adds the three carries.
// The (7:3) counter is the cell the relay multiplier is built from; the
// full-adder decomposition is this design's choice. Combinational.
//
// Ports: x (seven W-bit rows), s, c1, c2 (W-bit rows).
module compressor73 #(
  parameter int unsigned W = 64
) (
  input  logic [6:0][W-1:0] x,
  output logic [W-1:0]      s,
  output logic [W-1:0]      c1,
  output logic [W-1:0]      c2
);
  logic [W-1:0] sa, ca, sb, cb, cc, w1, w2;

  always_comb begin
    sa = x[0] ^ x[1] ^ x[2];
    ca = (x[0] & x[1]) | (x[2] & (x[0] ^ x[1]));
    sb = x[3] ^ x[4] ^ x[5];
    cb = (x[3] & x[4]) | (x[5] & (x[3] ^ x[4]));
    s  = sa ^ sb ^ x[6];
    cc = (sa & sb) | (x[6] & (sa ^ sb));
    w1 = ca ^ cb ^ cc;
    w2 = (ca & cb) | (cc & (ca ^ cb));
    c1 = w1 << 1;
    c2 = w2 << 2;
  end
endmodule
