// mux_tree: N:1 multiplexer of W-bit words built as a tree of 2:1
// multiplexers, the form used for every wide multiplexer of the FMA.
//
// Level s of the tree is a row of 2:1 multiplexers steered by select bit s;
// an N:1 multiplexer uses N-1 of them in ceil(log2 N) levels. Inputs beyond
// N (when N is not a power of two) read as zero. Inputs tied to constants
// are simply wired as constants; synthesis removes the 2:1 multiplexers
// whose output is then fixed, which is the pruning the relay design applies
// by hand. Combinational.
//
// Ports: din (N words), sel (index), dout (selected word).
module mux_tree #(
  parameter int unsigned N = 8,
  parameter int unsigned W = 32
) (
  input  logic [W-1:0]         din [N],
  input  logic [$clog2(N)-1:0] sel,
  output logic [W-1:0]         dout
);
  localparam int unsigned L  = $clog2(N);
  localparam int unsigned NP = 1 << L;

  logic [W-1:0] lvl [L+1][NP];

  always_comb begin
    for (int unsigned j = 0; j < NP; j++)
      lvl[0][j] = (j < N) ? din[j] : '0;
    for (int unsigned s = 0; s < L; s++)
      for (int unsigned j = 0; j < NP; j++)
        lvl[s+1][j] = (j < (NP >> (s + 1)))
                    ? (sel[s] ? lvl[s][2*j+1] : lvl[s][2*j]) : '0;
    dout = lvl[L][0];
  end
endmodule
