// toggle2: two-way transition Toggle.
//
// Successive transitions on t appear alternately on o0 and o1, starting with
// o0 after clear (t = 0, o0 = 0, o1 = 0). Two cross-coupled level latches form
// a double-edge Johnson stage: while t is high o0 takes ~o1, while t is low o1
// takes o0, so a rising t flips o0 and a falling t flips o1. Only one latch is
// transparent at a time, so the loop through them is not a combinational
// loop; the lint tools still see one and report latches, both intended.
// clr (active high) must be held while t is 0. Outputs follow after DLY time
// units (gate delay for simulation; synthesis ignores it).
//
// Origin: only the Toggle's behaviour is published; the two-latch
// construction is this design's.
module toggle2 #(
  parameter int unsigned DLY = 1
) (
  input  logic clr,
  input  logic t,
  output logic o0,
  output logic o1
);
  logic s0, s1;

  always_latch begin
    if (clr)    s0 = 1'b0;
    else if (t) s0 = ~s1;
  end

  always_latch begin
    if (clr)     s1 = 1'b0;
    else if (!t) s1 = s0;
  end

  assign #(DLY) o0 = s0;
  assign #(DLY) o1 = s1;
endmodule
