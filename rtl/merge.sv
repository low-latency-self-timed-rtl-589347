// merge: the "OR" of transitions.
//
// A transition on any input produces a transition on the output. With
// two-phase signalling this is an exclusive-OR of the inputs; the inputs are
// expected to be mutually exclusive in time so that no two transitions cancel.
// Purely combinational, zero delay.
//
// Origin: the XOR merge is the published element; the N-input form is
// this design's generalisation.
module merge #(
  parameter int N = 2
) (
  input  logic [N-1:0] t,
  output logic         y
);
  assign y = ^t;
endmodule
