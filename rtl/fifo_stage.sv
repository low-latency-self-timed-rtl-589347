// fifo_stage: one stage of a linear micropipeline FIFO.
//
// A C-element with an inverted second input drives the capture input of a
// transition latch. It fires when a new request has arrived on rin and the
// stage has been emptied (the pass-done of the previous word). Capture-done
// acknowledges the left side (ain) and requests the right side (rout); the
// right side's acknowledge (aout) makes the latch transparent again through
// its pass input. Two-phase signalling, bundled data: din must be stable
// before rin toggles and dout is stable from a rout transition until the
// matching aout transition. An empty stage is transparent, so data flow
// through with no delay beyond the control. clr (active high) empties it.
//
// Origin: the stage follows the published micropipeline stage (C-element
// with one inverted input driving a transition latch); the full output and
// the clear are this design's additions.
//
// Circular logic: a self-timed circuit is a ring of handshakes, so this
// module's outputs feed back to its own inputs through neighbouring cells
// (request forward, acknowledge back) or through its own latches. Lint tools
// report that as circular combinational logic. It is intended: every such
// ring passes through a C-element or latch that holds its value, so nothing
// oscillates, and in simulation each control element has a gate delay.
module fifo_stage #(
  parameter int W = 8
) (
  input  logic         clr,
  input  logic         rin,
  output logic         ain,
  input  logic [W-1:0] din,
  output logic         rout,
  input  logic         aout,
  output logic [W-1:0] dout,
  output logic         full
);
  logic cap, cd, pd;

  c_element #(.INV_B(1'b1)) u_join (.clr(clr), .a(rin), .b(pd), .c(cap));

  tlatch #(.W(W)) u_lat (
    .clr(clr), .c(cap), .p(aout), .d(din), .q(dout), .cd(cd), .pd(pd), .full(full)
  );

  assign ain  = cd;
  assign rout = cd;
endmodule
