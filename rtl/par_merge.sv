// par_merge: N-way toggle-merge for the parallel FIFO.
//
// Collects words from N parallel FIFOs in the order par_distribute filled
// them (0, 1, ..., N-1, 0, ...). Each incoming request passes a C-element;
// only the one that is enabled fires, and the fired requests are merged into
// rout. Every output acknowledge (aout) advances an N-way Toggle; toggle
// output i is the acknowledge to FIFO i and also enables the C-element of
// FIFO i+1. The C-element of FIFO 0 has an inverted enable, so it is armed
// after clear and re-armed by the last toggle output.
//
// The data multiplexer is steered by levels made from the Toggle transitions:
// FIFO j is selected while toggle output j-1 differs from output j (FIFO 0
// while the last output equals the first). For N = 4 this is the same choice
// as the two XOR-generated select bits stepping 00, 01, 11, 10. The select
// changes only after the consumer acknowledges, so dout is stable from rout
// to aout. clr (active high) resets every control signal.
//
// Origin: the published toggle-merge (Toggle on the output acknowledge
// gating one C-element per input, XOR-derived mux select); the one-hot select
// for any power-of-two N is this design's generalisation of the two-bit
// select, and picks the same input for N = 4.
module par_merge #(
  parameter int W = 8,
  parameter int N = 4
) (
  input  logic                clr,
  input  logic [N-1:0]        rin,
  output logic [N-1:0]        ain,
  input  logic [N-1:0][W-1:0] din,
  output logic                rout,
  input  logic                aout,
  output logic [W-1:0]        dout
);
  logic [N-1:0] tog, fired, sel;

  toggle_n #(.N(N)) u_tog (.clr(clr), .t(aout), .o(tog));
  assign ain = tog;

  for (genvar i = 0; i < N; i++) begin : g_chan
    if (i == 0) begin : g_first
      c_element #(.INV_B(1'b1)) u_join (.clr(clr), .a(rin[0]), .b(tog[N-1]), .c(fired[0]));
      assign sel[0] = (tog[N-1] == tog[0]);
    end else begin : g_rest
      c_element #(.INV_B(1'b0)) u_join (.clr(clr), .a(rin[i]), .b(tog[i-1]), .c(fired[i]));
      assign sel[i] = (tog[i-1] != tog[i]);
    end
  end

  merge #(.N(N)) u_mrg (.t(fired), .y(rout));

  always_comb begin
    dout = '0;
    for (int i = 0; i < N; i++)
      if (sel[i]) dout = din[i];
  end
endmodule
