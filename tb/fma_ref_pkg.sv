// fma_ref_pkg: exact reference model of the single-precision fused
// multiply-add used by the testbenches, written independently of the RTL.
//
// Both A*B and C are placed exactly in a 600-bit integer whose LSB weighs
// 2^-300 (the product of two denormals has LSB weight 2^-298, the largest
// value is below 2^256), the exact sum or difference is formed, and the
// result is rounded once to nearest-even with denormals and overflow.
package fma_ref_pkg;

function automatic logic [31:0] fma_ref(input logic [31:0] a, input logic [31:0] b,
                                        input logic [31:0] c);
  logic        sa, sb, sc, sp, sr;
  int          ea, eb, ec, q, r, e;
  logic [23:0] ma, mb, mc;
  logic [599:0] pv, cv, mag, kept;
  logic [47:0] pm;
  logic        a_nan, b_nan, c_nan, a_inf, b_inf, c_inf, a_z, b_z, c_z, guard, st;
  sa = a[31]; sb = b[31]; sc = c[31]; sp = sa ^ sb;
  a_nan = (a[30:23] == 8'hFF) && (a[22:0] != 0);
  b_nan = (b[30:23] == 8'hFF) && (b[22:0] != 0);
  c_nan = (c[30:23] == 8'hFF) && (c[22:0] != 0);
  a_inf = (a[30:0] == 31'h7F800000);
  b_inf = (b[30:0] == 31'h7F800000);
  c_inf = (c[30:0] == 31'h7F800000);
  a_z = (a[30:0] == 0); b_z = (b[30:0] == 0); c_z = (c[30:0] == 0);
  if (a_nan || b_nan || c_nan) return 32'h7FC00000;
  if ((a_inf && b_z) || (b_inf && a_z)) return 32'h7FC00000;
  if ((a_inf || b_inf) && c_inf && (sp != sc)) return 32'h7FC00000;
  if (a_inf || b_inf) return {sp, 31'h7F800000};
  if (c_inf) return {sc, 31'h7F800000};
  if ((a_z || b_z) && c_z) return {sp & sc, 31'h0};
  if (a_z || b_z) return c;
  ea = (a[30:23] == 0) ? 1 : int'(a[30:23]);
  eb = (b[30:23] == 0) ? 1 : int'(b[30:23]);
  ec = (c[30:23] == 0) ? 1 : int'(c[30:23]);
  ma = {a[30:23] != 0, a[22:0]};
  mb = {b[30:23] != 0, b[22:0]};
  mc = {c[30:23] != 0, c[22:0]};
  pm = 48'(ma) * 48'(mb);
  // value of product bit 0 is 2^(ea-127-23 + eb-127-23) = 2^(ea+eb-300)
  pv = 600'(pm) << (ea + eb);
  // value of addend bit 0 is 2^(ec-150)
  cv = 600'(mc) << (ec + 150);
  if (sp == sc) begin
    mag = pv + cv; sr = sp;
  end else if (pv >= cv) begin
    mag = pv - cv; sr = sp;
  end else begin
    mag = cv - pv; sr = sc;
  end
  if (mag == 0) return 32'h0;
  q = 0;
  for (int i = 0; i < 600; i++) if (mag[i]) q = i;
  // kept significand LSB index: 24 bits below q, not below 2^-149 (index 151)
  r = (q - 23 > 151) ? q - 23 : 151;
  kept = mag >> r;
  guard = mag[r-1];
  st = 1'b0;
  for (int i = 0; i < r - 1; i++) st |= mag[i];
  if (guard && (st || kept[0])) kept = kept + 1;
  if (kept[24]) begin kept = kept >> 1; r = r + 1; end
  // kept * 2^(r-300) with hidden bit 23 => biased exponent r - 150
  e = kept[23] ? r - 150 : 0;
  if (e >= 255) return {sr, 31'h7F800000};
  return {sr, 8'(e), kept[22:0]};
endfunction
endpackage
