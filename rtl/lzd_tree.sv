// lzd_tree: leading-zero detector of N inputs (N a power of two, N >= 2),
// built as a tree of 2-bit LZDs (the "Tree Design").
//
// Level 0 holds the single input bits, most significant first. Level 1 is a
// row of 2-bit LZDs (v = b1 | b0, p = ~b1), and every further level joins
// two neighbouring LZDs of the level below with the two-halves rule
//   v = vH | vL,  p = vH ? {0, pH} : {1, pL},
// so the root gives p, the number of leading zeros of b, and v, which is 0
// only when b is all zeros (p is then don't-care). The default of 16 inputs
// is the unit replicated for the FMA's large LZD. Combinational.
module lzd_tree #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]         b,
  output logic [$clog2(N)-1:0] p,
  output logic                 v
);
  localparam int unsigned L = $clog2(N);

  // node j of level l covers inputs N-1-j*2^l down to N-(j+1)*2^l;
  // its count uses the low l bits of the L-bit field
  logic [L-1:0] pc [L+1][N];
  logic         vc [L+1][N];

  always_comb begin
    for (int unsigned j = 0; j < N; j++) begin
      vc[0][j] = b[N-1-j];
      pc[0][j] = '0;
    end
    for (int unsigned l = 0; l < L; l++) begin
      for (int unsigned j = 0; j < N; j++) begin
        if (j < (N >> (l + 1))) begin
          vc[l+1][j] = vc[l][2*j] | vc[l][2*j+1];
          pc[l+1][j] = vc[l][2*j] ? pc[l][2*j] : (pc[l][2*j+1] | (L'(1) << l));
        end else begin
          vc[l+1][j] = 1'b0;
          pc[l+1][j] = '0;
        end
      end
    end
    p = pc[L][0];
    v = vc[L][0];
  end
endmodule
