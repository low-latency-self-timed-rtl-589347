// call2: two-client transition Call.
//
// Two clients share one resource ("hardware subroutine"). A request on r0 or
// r1 is passed to the resource on r; the resource's acknowledge on a is
// returned to the client that asked, on a0 or a1. The requests must be
// mutually exclusive: a client may only request when the other has no request
// outstanding. The request side is a merge (XOR); the acknowledge side is a
// select2 steered by client1_busy = r1 ^ a1, which is also brought out so a
// data multiplexer can follow the same choice. clr (active high) resets.
//
// Origin: the Call's behaviour is published; the XOR-plus-Select
// construction is this design's.
module call2 (
  input  logic clr,
  input  logic r0,
  input  logic r1,
  output logic r,
  input  logic a,
  output logic a0,
  output logic a1,
  output logic client1_busy
);
  assign r            = r0 ^ r1;
  assign client1_busy = r1 ^ a1;

  select2 u_ack (.clr(clr), .t(a), .sel(client1_busy), .o0(a0), .o1(a1));
endmodule
