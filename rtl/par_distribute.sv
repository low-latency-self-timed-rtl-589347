// par_distribute: N-way toggle-distribute for the parallel FIFO.
//
// Each input request goes, in turn, to one of N parallel FIFOs through an
// N-way Toggle (first request to rout[0]). Every acknowledge from a parallel
// FIFO is merged (XOR) into the single input acknowledge ain. It stores no
// data: the input data bus is wired to all N FIFOs, and the one that receives
// the request latches it. clr (active high) resets the Toggle.
//
// Origin: the published four-way toggle-distribute (N-way Toggle on the
// request, XOR of the acknowledges); the shared data bus is this design's.
module par_distribute #(
  parameter int N = 4
) (
  input  logic         clr,
  input  logic         rin,
  output logic         ain,
  output logic [N-1:0] rout,
  input  logic [N-1:0] aout
);
  toggle_n #(.N(N)) u_tog (.clr(clr), .t(rin), .o(rout));
  merge    #(.N(N)) u_mrg (.t(aout), .y(ain));
endmodule
