// code_decoder: one output of an N-bit decoder, active for a single input
// code CODE.
//
// A decoder has one output per input code. In the relay decoder each output
// is a series path with one switch per input bit, each switch closing when
// its bit matches the corresponding bit of the code; the "hot" rail reaches
// the output only when all bits match. Here that is the AND over all bits of
// x XNOR CODE. A full decoder is a row of these, one per code that is
// needed. The FMA uses them as the exponent all-zeros/all-ones detectors
// (N = 8), the fraction-is-zero detectors (N = 23) and the exponent-limit
// decoder (N = 7). Building each output separately follows the relay
// design; the code-as-parameter form is this design's. Combinational.
//
// Ports: x (N-bit input code), hit (1 when x == CODE).
module code_decoder #(
  parameter int unsigned    N    = 7,
  parameter logic [N-1:0]   CODE = '0
) (
  input  logic [N-1:0] x,
  output logic         hit
);
  assign hit = &(x ~^ CODE);
endmodule
