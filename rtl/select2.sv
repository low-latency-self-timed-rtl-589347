// select2: transition Select.
//
// A transition on t is steered to o0 when sel = 0 and to o1 when sel = 1;
// sel is a level that must be stable (bundled) when t toggles. The element
// keeps the invariant t == o0 ^ o1 when idle. It is two cross-coupled level
// latches: the o0 latch is transparent while sel = 0 and computes t ^ o1, the
// o1 latch is transparent while sel = 1 and computes t ^ o0. Because the
// invariant holds when idle, sel may change freely while no transition is
// pending. The latches are the intended storage. clr (active high) resets
// both outputs to 0 and must be held while t is 0. Outputs follow after DLY
// time units (gate delay for simulation; synthesis ignores it).
//
// Origin: the Select's behaviour is published; the cross-coupled latch
// construction is this design's.
//
// Circular logic: a self-timed circuit is a ring of handshakes, so this
// module's outputs feed back to its own inputs through neighbouring cells
// (request forward, acknowledge back) or through its own latches. Lint tools
// report that as circular combinational logic. It is intended: every such
// ring passes through a C-element or latch that holds its value, so nothing
// oscillates, and in simulation each control element has a gate delay.
module select2 #(
  parameter int unsigned DLY = 1
) (
  input  logic clr,
  input  logic t,
  input  logic sel,
  output logic o0,
  output logic o1
);
  logic s0, s1;

  always_latch begin
    if (clr)       s0 = 1'b0;
    else if (!sel) s0 = t ^ s1;
  end

  always_latch begin
    if (clr)      s1 = 1'b0;
    else if (sel) s1 = t ^ s0;
  end

  assign #(DLY) o0 = s0;
  assign #(DLY) o1 = s1;
endmodule
