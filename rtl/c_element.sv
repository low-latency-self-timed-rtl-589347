// c_element: Muller C-element (the "Join" of two transitions).
//
// The output copies the inputs when they agree and holds its value when they
// differ, so it produces one output transition only after both inputs have
// made a transition. With INV_B set, input b is inverted; such an element is
// "half-cocked": after clear one transition on a alone fires it.
//
// It is written as a level latch whose enable is (a == b') and whose data is
// a, the usual standard-cell realisation. The synthesis tools therefore
// report a latch here; it is the intended storage element. clr (active high)
// forces the output to 0, the all-zero state every control signal starts in.
// Timing: the output follows an enabling input change after DLY time units,
// the element's gate delay in simulation (synthesis ignores it). Delaying the
// control elements while data paths have none is what makes every bundled
// data word settle before the request that goes with it.
//
// Origin: the C-element's function and the half-cocked variant are the
// published ones; the latch form, the clear and the delay model are this
// design's choices.
//
// Circular logic: a self-timed circuit is a ring of handshakes, so this
// module's outputs feed back to its own inputs through neighbouring cells
// (request forward, acknowledge back) or through its own latches. Lint tools
// report that as circular combinational logic. It is intended: every such
// ring passes through a C-element or latch that holds its value, so nothing
// oscillates, and in simulation each control element has a gate delay.
module c_element #(
  parameter bit          INV_B = 1'b0,
  parameter int unsigned DLY   = 1
) (
  input  logic clr,
  input  logic a,
  input  logic b,
  output logic c
);
  logic b_eff;
  assign b_eff = b ^ INV_B;

  logic c_state;

  always_latch begin
    if (clr)             c_state = 1'b0;
    else if (a == b_eff) c_state = a;
  end

  assign #(DLY) c = c_state;
endmodule
