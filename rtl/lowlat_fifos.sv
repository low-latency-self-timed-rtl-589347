// lowlat_fifos: five organizations of a sixteen-word self-timed FIFO.
//
// The five FIFOs are alternative ways of building the same sixteen-word,
// eight-bit, two-phase bundled-data buffer with a different trade between
// latency and area:
//   ORG_LINEAR   micropipeline, every word passes all sixteen stages
//   ORG_PARALLEL four-way deal-out to four 4-stage FIFOs (4-latch path)
//   ORG_TREE     binary distribute/merge trees (8-cell path)
//   ORG_SQUARE   top row, four 2-stage columns, bottom row (L-shaped path)
//   ORG_FOLDED   U-shaped with jumps over empty cells (1 latch when empty)
// They stand side by side and share only the master clear. Channel k of
// every port vector belongs to organization k (fifo_pkg::fifo_org_e).
// Each channel: din stable, then rin toggles; ain toggles when the word is
// taken. rout toggles when dout holds a word; toggle aout to take it.
// clr (active high) empties all FIFOs; hold every rin and aout at 0 while it
// is asserted.
//
// Origin: the five organizations and their sixteen-word, eight-bit size are
// the published comparison set; placing them side by side in one top is this
// design's choice.
module lowlat_fifos
  import fifo_pkg::*;
#(
  parameter int W     = DATA_W,
  parameter int DEPTH = FIFO_DEPTH
) (
  input  logic                     clr,
  input  logic [N_ORGS-1:0]        rin,
  output logic [N_ORGS-1:0]        ain,
  input  logic [N_ORGS-1:0][W-1:0] din,
  output logic [N_ORGS-1:0]        rout,
  input  logic [N_ORGS-1:0]        aout,
  output logic [N_ORGS-1:0][W-1:0] dout
);
  if (DEPTH != 16) begin : g_bad_depth
    $error("lowlat_fifos: the organizations are sized for sixteen words");
  end

  fifo_linear #(.W(W), .DEPTH(DEPTH)) u_linear (
    .clr(clr), .rin(rin[ORG_LINEAR]), .ain(ain[ORG_LINEAR]), .din(din[ORG_LINEAR]),
    .rout(rout[ORG_LINEAR]), .aout(aout[ORG_LINEAR]), .dout(dout[ORG_LINEAR])
  );

  fifo_parallel #(.W(W), .DEPTH(DEPTH), .WAYS(4)) u_parallel (
    .clr(clr), .rin(rin[ORG_PARALLEL]), .ain(ain[ORG_PARALLEL]), .din(din[ORG_PARALLEL]),
    .rout(rout[ORG_PARALLEL]), .aout(aout[ORG_PARALLEL]), .dout(dout[ORG_PARALLEL])
  );

  fifo_tree #(.W(W), .LEVELS(3), .IN_STAGES(1), .OUT_STAGES(1)) u_tree (
    .clr(clr), .rin(rin[ORG_TREE]), .ain(ain[ORG_TREE]), .din(din[ORG_TREE]),
    .rout(rout[ORG_TREE]), .aout(aout[ORG_TREE]), .dout(dout[ORG_TREE])
  );

  fifo_square #(.W(W), .COLS(4), .COL_DEPTH(2)) u_square (
    .clr(clr), .rin(rin[ORG_SQUARE]), .ain(ain[ORG_SQUARE]), .din(din[ORG_SQUARE]),
    .rout(rout[ORG_SQUARE]), .aout(aout[ORG_SQUARE]), .dout(dout[ORG_SQUARE])
  );

  fifo_folded #(.W(W), .CELLS(DEPTH / 2), .LATCH_FIRST(1'b0)) u_folded (
    .clr(clr), .rin(rin[ORG_FOLDED]), .ain(ain[ORG_FOLDED]), .din(din[ORG_FOLDED]),
    .rout(rout[ORG_FOLDED]), .aout(aout[ORG_FOLDED]), .dout(dout[ORG_FOLDED])
  );
endmodule
