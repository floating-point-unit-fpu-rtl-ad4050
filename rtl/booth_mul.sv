// booth_mul: unsigned W x W -> 2W multiplier with radix-4 (modified) Booth
// recoding and a (7:3)-counter reduction tree.
//
// The multiplier operand is zero-extended and scanned in overlapping 3-bit
// groups; each of the W/2+1 groups selects 0, +-M or +-2M, weighted by 4^i.
// A negative digit enters the tree as the inverted magnitude, with the
// missing +1 collected in one extra row (the +1 bits of all digits sit at
// distinct positions 2i, so one row holds them all). The rows, in 2W-bit
// two's complement, are reduced level by level: every group of seven rows
// goes through a compressor73 row and becomes three, a leftover group of
// three goes through a row of full adders and becomes two, and at most two
// rows pass unchanged. When two rows remain, a Manchester-carry-chain adder
// (mcc_adder) forms the product. For the default W = 32 the 18 rows take
// five levels (18 -> 9 -> 5 -> 4 -> 3 -> 2); at W = 24 the 14 rows take
// four (14 -> 6 -> 4 -> 3 -> 2).
//
// The Booth encoding and the large-compressor multiplier follow the relay
// design; the exact tree shape, the extra row for the negation bits and the
// final carry-chain adder are this design's choices. Combinational.
//
// Ports: a, b (unsigned operands), p (product).
module booth_mul #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);
  localparam int unsigned NPP   = W / 2 + 1;    // number of Booth digits
  localparam int unsigned NROW  = NPP + 1;      // plus the negation-bit row
  localparam int unsigned PW    = 2 * W;        // row width

  // rows left after one reduction level
  function automatic int unsigned next_rows(int unsigned n);
    if (n <= 2) return n;
    return 3 * (n / 7) + 2 * ((n % 7) / 3) + (n % 7) % 3;
  endfunction

  function automatic int unsigned rows_at(int unsigned lvl);
    int unsigned n = NROW;
    for (int unsigned i = 0; i < lvl; i++) n = next_rows(n);
    return n;
  endfunction

  function automatic int unsigned num_levels();
    int unsigned n = NROW, l = 0;
    while (n > 2) begin
      n = next_rows(n);
      l++;
    end
    return l;
  endfunction

  localparam int unsigned NL = num_levels();

  logic [NROW-1:0][PW-1:0] row [NL+1];

  // ---- Booth digit selection -------------------------------------------
  logic [W+2:0] bx;
  assign bx = {2'b00, b, 1'b0};

  for (genvar i = 0; i < NPP; i++) begin : g_pp
    logic [2:0]    grp;
    logic          neg;
    logic [PW-1:0] mag;
    always_comb begin
      grp = bx[2*i +: 3];
      neg = grp[2] & ~(grp[1] & grp[0]);
      unique case (grp)
        3'b000, 3'b111: mag = '0;
        3'b011, 3'b100: mag = PW'(a) << 1;
        default:        mag = PW'(a);
      endcase
    end
    assign row[0][i]          = (neg ? ~mag : mag) << (2 * i);
    assign row[0][NPP][2*i]   = neg;
    assign row[0][NPP][2*i+1] = 1'b0;
  end
  if (2 * NPP < PW) begin : g_negpad
    assign row[0][NPP][PW-1:2*NPP] = '0;
  end

  // ---- reduction levels --------------------------------------------------
  for (genvar l = 0; l < NL; l++) begin : g_lvl
    localparam int unsigned N   = rows_at(l);
    localparam int unsigned G7  = N / 7;
    localparam int unsigned G3  = (N % 7) / 3;
    localparam int unsigned R   = (N % 7) % 3;
    localparam int unsigned NXT = 3 * G7 + 2 * G3 + R;

    for (genvar j = 0; j < G7; j++) begin : g_c73
      compressor73 #(.W(PW)) u_c73 (
        .x  (row[l][7*j +: 7]),
        .s  (row[l+1][3*j]),
        .c1 (row[l+1][3*j+1]),
        .c2 (row[l+1][3*j+2])
      );
    end
    for (genvar j = 0; j < G3; j++) begin : g_c32
      localparam int unsigned I = 7 * G7 + 3 * j;
      localparam int unsigned O = 3 * G7 + 2 * j;
      assign row[l+1][O]   = row[l][I] ^ row[l][I+1] ^ row[l][I+2];
      assign row[l+1][O+1] = ((row[l][I] & row[l][I+1])
                             | (row[l][I+2] & (row[l][I] ^ row[l][I+1]))) << 1;
    end
    for (genvar j = 0; j < R; j++) begin : g_pass
      assign row[l+1][3*G7+2*G3+j] = row[l][7*G7+3*G3+j];
    end
    for (genvar j = NXT; j < NROW; j++) begin : g_unused
      assign row[l+1][j] = '0;
    end
  end

  // ---- final carry-propagate addition ------------------------------------
  // Only the sum is needed: the carry out lies above the 2W-bit product and
  // the P/G/K terms serve the anticipator only where the adder feeds one.
  logic [PW-1:0] fsum, fp, fg, fk;
  logic          fcout;

  mcc_adder #(.W(PW)) u_final (
    .x    (row[NL][0]),
    .y    (row[NL][1]),
    .cin  (1'b0),
    .sum  (fsum),
    .cout (fcout),
    .p    (fp),
    .g    (fg),
    .k    (fk)
  );

  assign p = fsum;
endmodule
