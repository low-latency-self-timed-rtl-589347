// tlatch: micropipeline transition latch (capture-pass latch).
//
// A transition on c (capture) closes the latch and holds d; a transition on
// p (pass) opens it again. The latch is transparent while c == p and opaque
// (holding a word) while c != p, so full = c ^ p. It is the plain gated latch
// with an XOR forming the gate from c and p. cd (capture done) and pd (pass
// done) report completion. The latch has no delay of its own: cd equals c,
// and pd is a copy of p taken inside the latch process when it opens, so pd
// can only toggle after the latch has passed its input through. clr (active
// high) clears the data and pd.
//
// Origin: gated latches controlled by an XOR of the capture and pass
// inputs follow the published latch; the done outputs copied inside the
// latch process and the clear are this design's.
module tlatch #(
  parameter int W = 8
) (
  input  logic         clr,
  input  logic         c,
  input  logic         p,
  input  logic [W-1:0] d,
  output logic [W-1:0] q,
  output logic         cd,
  output logic         pd,
  output logic         full
);
  always_latch begin
    if (clr) begin
      q  = '0;
      pd = 1'b0;
    end else if (c == p) begin
      q  = d;
      pd = p;
    end
  end

  assign cd   = c;
  assign full = c ^ p;
endmodule
