// norm_shifter: logical left barrel shifter for normalization.
//
// Shifts the 77-bit result_preshift left by the leading-zero count (0..127;
// the FMA uses 0..76) through seven 2:1 multiplexer stages of 1, 2, 4, ... 64
// positions, filling with zeros. Combinational.
module norm_shifter
  import fma_pkg::*;
(
  input  logic [WIN_W-1:0] din,
  input  logic [SH_W-1:0]  shamt,
  output logic [WIN_W-1:0] dout
);
  logic [WIN_W-1:0] stage [SH_W+1];

  always_comb begin
    stage[0] = din;
    for (int unsigned s = 0; s < SH_W; s++)
      stage[s+1] = shamt[s] ? (stage[s] << (1 << s)) : stage[s];
    dout = stage[SH_W];
  end
endmodule
