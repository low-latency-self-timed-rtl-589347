// tree_dist_cell: toggle-distribute FIFO stage.
//
// A FIFO stage (C-element + transition latch) that stores one word and then
// offers it alternately on output 0 and output 1: capture-done acknowledges
// the input and drives a two-way Toggle whose outputs are the two output
// requests (first word to output 0). Either output's acknowledge (merged)
// passes the latch. The single data bus dout belongs to whichever output was
// last requested. In the square FIFO the Toggle outputs double as the two
// kinds of acknowledge to the left (ALR = rout0, ALD = rout1). clr resets.
//
// Origin: the published toggle-distribute cell (FIFO stage whose output goes
// through a Toggle); also used, as published, as the next-to-last top cell of
// the square FIFO.
//
// Circular logic: a self-timed circuit is a ring of handshakes, so this
// module's outputs feed back to its own inputs through neighbouring cells
// (request forward, acknowledge back) or through its own latches. Lint tools
// report that as circular combinational logic. It is intended: every such
// ring passes through a C-element or latch that holds its value, so nothing
// oscillates, and in simulation each control element has a gate delay.
module tree_dist_cell #(
  parameter int W = 8
) (
  input  logic         clr,
  input  logic         rin,
  output logic         ain,
  input  logic [W-1:0] din,
  output logic         rout0,
  input  logic         aout0,
  output logic         rout1,
  input  logic         aout1,
  output logic [W-1:0] dout
);
  logic cap, cd, pd, pass, full;

  c_element #(.INV_B(1'b1)) u_join (.clr(clr), .a(rin), .b(pd), .c(cap));
  assign pass = aout0 ^ aout1;

  tlatch #(.W(W)) u_lat (
    .clr(clr), .c(cap), .p(pass), .d(din), .q(dout), .cd(cd), .pd(pd), .full(full)
  );

  assign ain = cd;
  toggle2 u_tog (.clr(clr), .t(cd), .o0(rout0), .o1(rout1));
endmodule
