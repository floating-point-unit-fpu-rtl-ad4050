// lzd76: 76-bit leading-zero detector made of five 16-bit tree LZDs.
//
// Four LZD16s cover bits 75..12 and are paired into two 32-bit and one 64-bit
// LZD with the two-halves rule (v = vH | vL, p = vH ? {0,pH} : {1,pL}). The
// fifth LZD16 covers bits 11..0 padded with four zeros below, and is joined to
// the 64-bit result as if it were the lower half of a 128-bit LZD. Output p is
// the number of leading zeros (0..75); v = 0 when all bits are zero.
// Combinational.
module lzd76
  import fma_pkg::*;
(
  input  logic [LZD_W-1:0] b,
  output logic [SH_W-1:0]  p,
  output logic             v
);
  logic [3:0] p16 [5];
  logic [4:0] v16;
  logic [4:0] p32 [2];
  logic [1:0] v32;
  logic [5:0] p64;
  logic       v64;

  for (genvar i = 0; i < 4; i++) begin : g_lzd16
    lzd_tree #(.N(16)) u_lzd (.b(b[LZD_W-1-16*i -: 16]), .p(p16[i]), .v(v16[i]));
  end
  lzd_tree #(.N(16)) u_lzd_low (.b({b[11:0], 4'b0000}), .p(p16[4]), .v(v16[4]));

  always_comb begin
    for (int i = 0; i < 2; i++) begin
      v32[i] = v16[2*i] | v16[2*i+1];
      p32[i] = v16[2*i] ? {1'b0, p16[2*i]} : {1'b1, p16[2*i+1]};
    end
    v64 = v32[0] | v32[1];
    p64 = v32[0] ? {1'b0, p32[0]} : {1'b1, p32[1]};
    v   = v64 | v16[4];
    p   = v64 ? {1'b0, p64} : {3'b100, p16[4]};
  end
endmodule
