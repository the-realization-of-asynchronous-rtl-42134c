// dtl_melem -- M-element, the transition or-gate.
//
// Function: the output z makes a transition whenever any one of the K inputs
// makes one. With at most one input changing at a time this is the modulo-2
// sum of the input levels, z = x[0] ^ x[1] ^ ... ^ x[K-1], which for K=2 is a
// single exclusive-or gate. Purely combinational; its level output is the
// state variable y_j or the transition output Z_k of the circuit it sits in.
//
// Interface: x (K input levels), z (output level). K defaults to 2, the
// two-input element of the document; any K >= 1 is accepted.
// Timing: no clock, zero cycles.
module dtl_melem #(
  parameter int unsigned K = 2
) (
  input  logic [K-1:0] x,
  output logic         z
);

  assign z = ^x;

endmodule
