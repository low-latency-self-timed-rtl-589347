// qselect2: Q-Select, a Select whose select input is not bundled.
//
// sel may change at any time, even while a transition on t is arriving, so it
// must be sampled. A level latch holds sel while an input transition is
// pending (t != o0 ^ o1) and follows it otherwise; the held value steers the
// transition through a select2. In silicon the sampling element is a Q-flop
// or a mutual-exclusion arbiter that resolves metastability; that analog
// behaviour has no two-state equivalent and this model simply samples the
// value present when the transition arrives. clr (active high) resets all.
//
// Origin: the Q-Select's behaviour (sample an unbundled select) is
// published; real hardware uses an arbiter or Q-flop, which a two-state model
// cannot reproduce, so the level-latch sampling model is this design's.
module qselect2 (
  input  logic clr,
  input  logic t,
  input  logic sel,
  output logic o0,
  output logic o1
);
  logic sel_held;
  logic pending;

  assign pending = t ^ o0 ^ o1;

  always_latch begin
    if (clr)           sel_held = 1'b0;
    else if (!pending) sel_held = sel;
  end

  select2 u_sel (.clr(clr), .t(t), .sel(sel_held), .o0(o0), .o1(o1));
endmodule
