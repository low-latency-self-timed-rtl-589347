// fold_bot_cell: output-side cell of the folded (arbited) FIFO.
//
// Takes a word either from the right (the next output-side cell, or the
// U-turn from the last input-side cell) or from the input-side cell above
// when a word jumps, and passes it left towards the output. The two requests
// are mutually exclusive by construction of the jump rule; a Call merges them
// into one request, which a C-element (inverted enable from pass-done) lets
// into the latch once it is empty, and routes capture-done back to the
// requester. The data multiplexer follows the Call's "top request
// outstanding" level, which is set by the top request itself and cleared by
// its acknowledge, so it is settled before the capture.
//
// Full detection: full = capture xor pass; fo = full | fi forms the daisy
// chain "this cell or any cell upstream of it on the output side is full".
// clr (active high) resets every control signal.
//
// Origin: the published bottom cell (Call into the latch, mux, XOR full
// detector, OR daisy chain).
//
// Circular logic: a self-timed circuit is a ring of handshakes, so this
// module's outputs feed back to its own inputs through neighbouring cells
// (request forward, acknowledge back) or through its own latches. Lint tools
// report that as circular combinational logic. It is intended: every such
// ring passes through a C-element or latch that holds its value, so nothing
// oscillates, and in simulation each control element has a gate delay.
module fold_bot_cell #(
  parameter int W = 8
) (
  input  logic         clr,
  // from the right (upstream on the output side)
  input  logic         rr,
  output logic         ar,
  input  logic [W-1:0] dr,
  // from the input-side cell above
  input  logic         rt,
  output logic         at,
  input  logic [W-1:0] dt,
  // to the left (towards the output)
  output logic         rout,
  input  logic         aout,
  output logic [W-1:0] dout,
  // full-status chain
  input  logic         fi,
  output logic         fo
);
  logic req, cap, cd, pd, full, top_busy;
  logic [W-1:0] d;

  call2 u_call (
    .clr(clr), .r0(rr), .r1(rt), .r(req), .a(cd), .a0(ar), .a1(at), .client1_busy(top_busy)
  );

  c_element #(.INV_B(1'b1)) u_join (.clr(clr), .a(req), .b(pd), .c(cap));

  assign d = top_busy ? dt : dr;

  tlatch #(.W(W)) u_lat (
    .clr(clr), .c(cap), .p(aout), .d(d), .q(dout), .cd(cd), .pd(pd), .full(full)
  );

  assign rout = cd;
  assign fo   = full | fi;
endmodule
