// fma_pkg: widths, field positions and shared types of the single-precision
// fused multiply-add (FMA) datapath.
//
// The datapath works in a 77-bit "window" (bits 76..0). The 48-bit product of
// the two 24-bit significands sits at window bits 49..2; the addend
// significand is placed at most at window bits 75..52 (two bits above the
// product) and shifted right from there by the alignment shifter. Bit 76 is
// the carry position of an effective addition. Bits of the addend that fall
// below window bit 0 are kept only as a sticky bit. The 99-bit alignment
// shifter, the 77-bit normalization shifter and the 76-bit leading-zero
// detector follow the sizes given for the design; how the window is laid out
// inside those sizes is this implementation's choice.
package fma_pkg;

  localparam int unsigned EXP_W   = 8;    // IEEE-754 single exponent
  localparam int unsigned FRAC_W  = 23;   // IEEE-754 single fraction
  localparam int unsigned SIG_W   = 24;   // significand with hidden bit
  localparam int unsigned BIAS    = 127;
  localparam int unsigned PROD_W  = 2 * SIG_W;      // 48-bit product
  localparam int unsigned WIN_W   = 77;             // normalization window
  localparam int unsigned ALIGN_W = 99;             // alignment shifter width
  localparam int unsigned LZD_W   = 76;             // leading-zero detector
  localparam int unsigned SH_W    = 7;              // shift amount width
  localparam int unsigned PROD_LSB = 2;             // window bit of product LSB
  localparam int unsigned C_TOP_LSB = 52;           // window bit of unshifted addend LSB
  // Internal exponent arithmetic is signed and wide enough for
  // a_exp + b_exp - 99 and the shift counts subtracted from it.
  localparam int unsigned EW = 12;
  typedef logic signed [EW-1:0] exp_t;

  // Alignment offset: shift = ea + eb - ec - ALIGN_OFFSET, with
  // ALIGN_OFFSET = 2*BIAS + 46 - 150 + 50 = 100 for this window layout.
  localparam int ALIGN_OFFSET = 100;
  // Biased exponent of window bit 76 in the product frame: ea + eb - 99.
  localparam int EXPBASE_OFFSET = 99;

  typedef struct packed {
    logic              sign;
    logic [EXP_W-1:0]  exp;
    logic [FRAC_W-1:0] frac;
  } fp32_t;

  // Operand classes decoded by the exception logic.
  typedef struct packed {
    logic is_zero;
    logic is_denorm;
    logic is_inf;
    logic is_nan;
    logic is_snan;
  } fp_class_t;

  // Output choices of the final multiplexer.
  typedef enum logic [2:0] {
    SEL_ROUNDED = 3'd0,   // normal datapath result (rounded)
    SEL_QNAN    = 3'd1,   // canonical quiet NaN
    SEL_INF     = 3'd2,   // signed infinity
    SEL_ADDEND  = 3'd3,   // C passed through (A*B is exactly zero)
    SEL_ZERO    = 3'd4    // signed zero
  } out_sel_e;

  localparam logic [31:0] QNAN = 32'h7FC0_0000;

endpackage
