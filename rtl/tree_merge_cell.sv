// tree_merge_cell: toggle-merge FIFO stage.
//
// A FIFO stage that takes words alternately from input 0 and input 1 (input 0
// first) into one latch. Each input request passes its own C-element; the
// input-0 C-element has an inverted enable, so it is armed after clear. The
// latch's pass-done drives a Toggle (x0, x1) that arms input 1 after a word
// from input 0 has been consumed and input 0 after a word from input 1. The
// fired requests are merged into the latch's capture input. Capture-done
// drives a second Toggle whose outputs acknowledge input 0 and input 1 in
// turn, and is itself the output request.
//
// Data multiplexer: sel = x0 ^ ain1. It is 0 after clear (input 0), becomes
// 1 when the word from input 0 has been consumed, and returns to 0 when the
// word from input 1 has been latched, so it is always set before the
// C-element of the chosen input can fire.
//
// In the square FIFO's bottom row ain0/ain1 also serve as the two kinds of
// request to the right (ROUTH after a word from input 0, ROUTV after a word
// from input 1). clr (active high) resets every control signal.
//
// Origin: the published toggle-merge cell with its mux; the exact select
// equation (arming Toggle XOR branch-1 acknowledge) is this design's
// realisation of the described select sequence.
//
// Circular logic: a self-timed circuit is a ring of handshakes, so this
// module's outputs feed back to its own inputs through neighbouring cells
// (request forward, acknowledge back) or through its own latches. Lint tools
// report that as circular combinational logic. It is intended: every such
// ring passes through a C-element or latch that holds its value, so nothing
// oscillates, and in simulation each control element has a gate delay.
module tree_merge_cell #(
  parameter int W = 8
) (
  input  logic         clr,
  input  logic         rin0,
  output logic         ain0,
  input  logic [W-1:0] din0,
  input  logic         rin1,
  output logic         ain1,
  input  logic [W-1:0] din1,
  output logic         rout,
  input  logic         aout,
  output logic [W-1:0] dout
);
  logic fire0, fire1, cap, cd, pd, full, x0, x1, sel;
  logic [W-1:0] d;

  c_element #(.INV_B(1'b1)) u_join0 (.clr(clr), .a(rin0), .b(x1), .c(fire0));
  c_element #(.INV_B(1'b0)) u_join1 (.clr(clr), .a(rin1), .b(x0), .c(fire1));
  assign cap = fire0 ^ fire1;

  assign sel = x0 ^ ain1;
  assign d   = sel ? din1 : din0;

  tlatch #(.W(W)) u_lat (
    .clr(clr), .c(cap), .p(aout), .d(d), .q(dout), .cd(cd), .pd(pd), .full(full)
  );

  toggle2 u_ack (.clr(clr), .t(cd), .o0(ain0), .o1(ain1));
  toggle2 u_arm (.clr(clr), .t(pd), .o0(x0), .o1(x1));
  assign rout = cd;
endmodule
