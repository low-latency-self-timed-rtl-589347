// fold_top_cell: input-side cell of the folded (arbited) FIFO.
//
// A word arriving from the left either jumps down into the output-side cell
// below (when nothing downstream of it holds data) or is latched here and
// passed right. go_right is the unbundled "something downstream is full"
// level made by the full-status daisy chains; a Q-Select samples it.
//
// LATCH_FIRST = 0 (the low-latency arrangement): the Q-Select sits before the
// latch. A jumping word is not latched here: its request goes straight to the
// cell below with din as its data, and that cell's acknowledge is merged into
// ain. In an empty FIFO a word then passes a single latch. go_right must
// include this cell's own full flag.
// LATCH_FIRST = 1: the word is always latched first and the Q-Select steers
// capture-done right or down; dout feeds both outputs. A word passes two
// latches in an empty FIFO, but ain returns after one latch.
//
// full = capture xor pass of this cell's latch. clr (active high) resets.
//
// Origin: both published top-cell arrangements (Q-Select before or after
// the latch); treating the cell's own full flag as part of the chain in the
// Q-Select-first form is this design's reading.
//
// Circular logic: a self-timed circuit is a ring of handshakes, so this
// module's outputs feed back to its own inputs through neighbouring cells
// (request forward, acknowledge back) or through its own latches. Lint tools
// report that as circular combinational logic. It is intended: every such
// ring passes through a C-element or latch that holds its value, so nothing
// oscillates, and in simulation each control element has a gate delay.
module fold_top_cell #(
  parameter int W           = 8,
  parameter bit LATCH_FIRST = 1'b0
) (
  input  logic         clr,
  input  logic         rin,
  output logic         ain,
  input  logic [W-1:0] din,
  output logic         rout,
  input  logic         aout,
  output logic [W-1:0] dout,
  output logic         rdown,
  input  logic         adown,
  output logic [W-1:0] ddown,
  input  logic         go_right,
  output logic         full
);
  logic cap, cd, pd;

  if (!LATCH_FIRST) begin : g_type1
    logic r_latch;

    qselect2 u_qsel (.clr(clr), .t(rin), .sel(go_right), .o0(rdown), .o1(r_latch));
    c_element #(.INV_B(1'b1)) u_join (.clr(clr), .a(r_latch), .b(pd), .c(cap));

    tlatch #(.W(W)) u_lat (
      .clr(clr), .c(cap), .p(aout), .d(din), .q(dout), .cd(cd), .pd(pd), .full(full)
    );

    assign rout  = cd;
    assign ain   = cd ^ adown;
    assign ddown = din;
  end else begin : g_type2
    logic pass;

    c_element #(.INV_B(1'b1)) u_join (.clr(clr), .a(rin), .b(pd), .c(cap));
    assign pass = aout ^ adown;

    tlatch #(.W(W)) u_lat (
      .clr(clr), .c(cap), .p(pass), .d(din), .q(dout), .cd(cd), .pd(pd), .full(full)
    );

    assign ain = cd;
    qselect2 u_qsel (.clr(clr), .t(cd), .sel(go_right), .o0(rdown), .o1(rout));
    assign ddown = dout;
  end
endmodule
