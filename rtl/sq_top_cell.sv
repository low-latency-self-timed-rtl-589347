// sq_top_cell: top-row select cell of the square FIFO.
//
// Latches a word from the left and sends it either right (rout_r) or down
// into its column (rout_d). The choice is a level, sel_down = ard ^ ad: an
// acknowledge of the "down" kind from the right neighbour (ARD: the
// neighbour's next word goes down, so ours must) sets it, and the
// acknowledge from the column (AD) clears it. Capture-done goes through a
// Select steered by sel_down; its two outputs are both the request (right or
// down) and the acknowledge to the left neighbour, of the "right" kind (ALR)
// or the "down" kind (ALD). Any acknowledge (ARR, ARD or AD) passes the
// latch. After clear words go right. The word on dout goes to both outputs.
// clr (active high) resets every control signal.
//
// Origin: the published top-row select cell (latch reopened by any of the
// three acknowledges, Select steered by the kind of the last one); the exact
// XOR equations are this design's.
//
// Circular logic: a self-timed circuit is a ring of handshakes, so this
// module's outputs feed back to its own inputs through neighbouring cells
// (request forward, acknowledge back) or through its own latches. Lint tools
// report that as circular combinational logic. It is intended: every such
// ring passes through a C-element or latch that holds its value, so nothing
// oscillates, and in simulation each control element has a gate delay.
module sq_top_cell #(
  parameter int W = 8
) (
  input  logic         clr,
  // from the left
  input  logic         rin,
  output logic         ain_r,   // ALR
  output logic         ain_d,   // ALD
  input  logic [W-1:0] din,
  // to the right
  output logic         rout_r,
  input  logic         arr,
  input  logic         ard,
  // down into the column
  output logic         rout_d,
  input  logic         ad,
  output logic [W-1:0] dout
);
  logic cap, cd, pd, pass, full, sel_down;

  c_element #(.INV_B(1'b1)) u_join (.clr(clr), .a(rin), .b(pd), .c(cap));
  assign pass     = arr ^ ard ^ ad;
  assign sel_down = ard ^ ad;

  tlatch #(.W(W)) u_lat (
    .clr(clr), .c(cap), .p(pass), .d(din), .q(dout), .cd(cd), .pd(pd), .full(full)
  );

  select2 u_sel (.clr(clr), .t(cd), .sel(sel_down), .o0(rout_r), .o1(rout_d));
  assign ain_r = rout_r;
  assign ain_d = rout_d;
endmodule
