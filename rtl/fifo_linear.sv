// fifo_linear: linear self-timed flow-through FIFO (micropipeline).
//
// DEPTH fifo_stage cells in a row. Every word passes through every stage, so
// the empty-FIFO latency grows with DEPTH, while throughput is set by one
// stage's cycle and does not depend on DEPTH. Capacity is DEPTH words.
// DEPTH = 0 gives a plain wire channel (used where a structure needs an empty
// branch). Two-phase bundled-data channels on both sides; clr empties it.
//
// Origin: the published linear micropipeline FIFO; DEPTH = 16 is the
// published size.
//
// Circular logic: a self-timed circuit is a ring of handshakes, so this
// module's outputs feed back to its own inputs through neighbouring cells
// (request forward, acknowledge back) or through its own latches. Lint tools
// report that as circular combinational logic. It is intended: every such
// ring passes through a C-element or latch that holds its value, so nothing
// oscillates, and in simulation each control element has a gate delay.
module fifo_linear #(
  parameter int W     = 8,
  parameter int DEPTH = 16
) (
  input  logic         clr,
  input  logic         rin,
  output logic         ain,
  input  logic [W-1:0] din,
  output logic         rout,
  input  logic         aout,
  output logic [W-1:0] dout
);
  if (DEPTH == 0) begin : g_wire
    assign rout = rin;
    assign ain  = aout;
    assign dout = din;
  end else begin : g_stages
    logic [DEPTH:0]      r, a;
    logic [W-1:0]        d [DEPTH+1];
    logic [DEPTH-1:0]    full;

    assign r[0]     = rin;
    assign ain      = a[0];
    assign d[0]     = din;
    assign rout     = r[DEPTH];
    assign a[DEPTH] = aout;
    assign dout     = d[DEPTH];

    for (genvar i = 0; i < DEPTH; i++) begin : g_stage
      fifo_stage #(.W(W)) u_stage (
        .clr(clr), .rin(r[i]), .ain(a[i]), .din(d[i]),
        .rout(r[i+1]), .aout(a[i+1]), .dout(d[i+1]), .full(full[i])
      );
    end
  end
endmodule
