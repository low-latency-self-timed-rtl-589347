// sq_bot_cell: bottom-row select cell of the square FIFO.
//
// Collects a word either from its column (top input) or from the left
// neighbour and forwards it right. Requests from the left come in two kinds:
// RINH (after this word take the next one from the left as well) and RINV
// (after this word take the next one from the column). Requests to the right
// carry the same meaning for the right neighbour (ROUTH / ROUTV).
//
// mode_v (1: waiting for the column) is ~(routv ^ aint): it starts at 1,
// is cleared by the acknowledge that latched a column word, and set by an
// ROUTV request. mode_v steers the data multiplexer, a Select that sends
// capture-done back as the acknowledge to the column or to the left, and a
// Select that sends pass-done (the right neighbour's acknowledge) to re-arm
// either the column C-element (inverted enable, armed after clear) or the
// left C-element. type_v = rinv ^ routv records that the latched word came
// with RINV; a third Select steers capture-done to ROUTV when it is set and
// to ROUTH otherwise. All three levels change only after a capture, so each
// is stable before the next transition it steers. clr (active high) resets.
//
// Origin: the published bottom-row select cell (two C-elements, the column one
// half-cocked, a mux and three Selects, the mux switched by ROUTV rather than
// RINV); the XOR encoding of the two state levels is this design's.
//
// Circular logic: a self-timed circuit is a ring of handshakes, so this
// module's outputs feed back to its own inputs through neighbouring cells
// (request forward, acknowledge back) or through its own latches. Lint tools
// report that as circular combinational logic. It is intended: every such
// ring passes through a C-element or latch that holds its value, so nothing
// oscillates, and in simulation each control element has a gate delay.
module sq_bot_cell #(
  parameter int W = 8
) (
  input  logic         clr,
  // from the left neighbour
  input  logic         rinh,
  input  logic         rinv,
  output logic         ainl,
  input  logic [W-1:0] dinl,
  // from the column above
  input  logic         rint,
  output logic         aint,
  input  logic [W-1:0] dint,
  // to the right
  output logic         routh,
  output logic         routv,
  input  logic         aout,
  output logic [W-1:0] dout
);
  logic rinl, fire_t, fire_l, cap, cd, pd, full;
  logic arm_t, arm_l, mode_v, type_v;
  logic [W-1:0] d;

  assign rinl   = rinh ^ rinv;
  assign mode_v = ~(routv ^ aint);
  assign type_v = rinv ^ routv;

  c_element #(.INV_B(1'b1)) u_join_t (.clr(clr), .a(rint), .b(arm_t), .c(fire_t));
  c_element #(.INV_B(1'b0)) u_join_l (.clr(clr), .a(rinl), .b(arm_l), .c(fire_l));
  assign cap = fire_t ^ fire_l;

  assign d = mode_v ? dint : dinl;

  tlatch #(.W(W)) u_lat (
    .clr(clr), .c(cap), .p(aout), .d(d), .q(dout), .cd(cd), .pd(pd), .full(full)
  );

  select2 u_ack (.clr(clr), .t(cd), .sel(mode_v), .o0(ainl),  .o1(aint));
  select2 u_req (.clr(clr), .t(cd), .sel(type_v), .o0(routh), .o1(routv));
  select2 u_arm (.clr(clr), .t(pd), .sel(mode_v), .o0(arm_l), .o1(arm_t));
endmodule
