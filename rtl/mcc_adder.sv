// mcc_adder: W-bit adder with a Manchester carry chain.
//
// Every bit forms propagate P = x ^ y, generate G = x & y and kill
// K = ~(x | y); the carry ripples along the chain c[i+1] = G[i] | P[i] & c[i],
// which a relay circuit evaluates as one pass-switch chain in a single
// mechanical delay. The P/G/K terms are exported for the leading-zero
// anticipator. Combinational.
//
// Ports: x, y, cin; sum, cout, and the per-bit p, g, k terms.
module mcc_adder #(
  parameter int unsigned W = 77
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout,
  output logic [W-1:0] p,
  output logic [W-1:0] g,
  output logic [W-1:0] k
);
  logic [W:0] c;

  assign p    = x ^ y;
  assign g    = x & y;
  assign k    = ~(x | y);
  assign c[0] = cin;
  for (genvar i = 0; i < W; i++) begin : g_chain
    assign c[i+1] = g[i] | (p[i] & c[i]);
  end
  assign sum  = p ^ c[W-1:0];
  assign cout = c[W];
endmodule
