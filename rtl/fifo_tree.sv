// fifo_tree: tree self-timed flow-through FIFO.
//
// IN_STAGES linear stages, then a binary fan-out tree of toggle-distribute
// cells mirrored by a fan-in tree of toggle-merge cells (LEVELS deep), then
// OUT_STAGES linear stages. Every cell stores a word, so the capacity is
// IN_STAGES + OUT_STAGES + 2 * (2^LEVELS - 1) and a word passes
// IN_STAGES + OUT_STAGES + 2 * LEVELS cells. The defaults give sixteen words
// on an eight-cell path (a linear FIFO of sixteen passes sixteen).
//
// The two trees are numbered heap-style: cell h (1 .. 2^LEVELS - 1) has
// children 2h and 2h + 1. Channel dc[h] enters distribute cell h (or, for
// h >= 2^LEVELS, is a leaf), channel mc[h] leaves merge cell h; a leaf
// channel goes straight from the last distribute cell to the first merge
// cell. Both trees alternate between branch 0 and branch 1, so the merge
// side takes words back in the order the distribute side handed them out.
// Two-phase bundled-data channels on both sides; clr (active high) empties it.
//
// Origin: the published tree FIFO with a sixteen-word, eight-cell path;
// splitting it into a three-level tree plus one linear stage at each end is
// this design's choice.
module fifo_tree #(
  parameter int W          = 8,
  parameter int LEVELS     = 3,
  parameter int IN_STAGES  = 1,
  parameter int OUT_STAGES = 1
) (
  input  logic         clr,
  input  logic         rin,
  output logic         ain,
  input  logic [W-1:0] din,
  output logic         rout,
  input  logic         aout,
  output logic [W-1:0] dout
);
  localparam int NL = 1 << LEVELS;   // number of leaf channels

  // Distribute-side channels dc[1 .. 2*NL-1] and merge-side channels mc[..].
  logic         dc_r [1:2*NL-1];
  logic         dc_a [1:2*NL-1];
  logic [W-1:0] dc_d [1:2*NL-1];
  logic         mc_r [1:2*NL-1];
  logic         mc_a [1:2*NL-1];
  logic [W-1:0] mc_d [1:2*NL-1];

  fifo_linear #(.W(W), .DEPTH(IN_STAGES)) u_head (
    .clr(clr), .rin(rin), .ain(ain), .din(din),
    .rout(dc_r[1]), .aout(dc_a[1]), .dout(dc_d[1])
  );

  for (genvar h = 1; h < NL; h++) begin : g_cell
    logic [W-1:0] d_split;

    tree_dist_cell #(.W(W)) u_dist (
      .clr(clr), .rin(dc_r[h]), .ain(dc_a[h]), .din(dc_d[h]),
      .rout0(dc_r[2*h]), .aout0(dc_a[2*h]), .rout1(dc_r[2*h+1]), .aout1(dc_a[2*h+1]),
      .dout(d_split)
    );
    assign dc_d[2*h]   = d_split;
    assign dc_d[2*h+1] = d_split;

    tree_merge_cell #(.W(W)) u_merge (
      .clr(clr),
      .rin0(mc_r[2*h]),   .ain0(mc_a[2*h]),   .din0(mc_d[2*h]),
      .rin1(mc_r[2*h+1]), .ain1(mc_a[2*h+1]), .din1(mc_d[2*h+1]),
      .rout(mc_r[h]), .aout(mc_a[h]), .dout(mc_d[h])
    );
  end

  for (genvar h = NL; h < 2*NL; h++) begin : g_leaf
    assign mc_r[h] = dc_r[h];
    assign dc_a[h] = mc_a[h];
    assign mc_d[h] = dc_d[h];
  end

  fifo_linear #(.W(W), .DEPTH(OUT_STAGES)) u_tail (
    .clr(clr), .rin(mc_r[1]), .ain(mc_a[1]), .din(mc_d[1]),
    .rout(rout), .aout(aout), .dout(dout)
  );
endmodule
