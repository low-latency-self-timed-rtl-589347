// fifo_folded: folded (arbited) self-timed flow-through FIFO.
//
// CELLS input-side cells (fold_top_cell) carry words to the right; at the end
// the words make a U-turn into CELLS output-side cells (fold_bot_cell) that
// carry them left to the output. Top cell i sits above bottom cell i, and a
// word in top cell i jumps straight down into bottom cell i when no cell
// downstream of it is full: no later input-side cell (the top chain, which in
// the LATCH_FIRST = 0 arrangement also covers cell i itself) and neither
// bottom cell i nor any bottom cell to its right (the bottom chain). Jumping
// therefore never lets a word overtake an older one. In an empty FIFO a word
// goes from the input straight into bottom cell 0, so the latency does not
// depend on CELLS; it grows only as the FIFO fills.
//
// Both full chains are OR daisy chains of per-cell capture-xor-pass flags.
// They do not glitch low while a word moves, because a sending and a
// receiving stage are both full until the receiver acknowledges. The chains
// are sampled by the Q-Select of each top cell. Capacity is 2 * CELLS words.
// Two-phase bundled-data channels; clr (active high) empties it.
//
// Origin: the published folded (arbited) FIFO; eight cell pairs give the
// published sixteen words.
module fifo_folded #(
  parameter int W           = 8,
  parameter int CELLS       = 8,
  parameter bit LATCH_FIRST = 1'b0
) (
  input  logic         clr,
  input  logic         rin,
  output logic         ain,
  input  logic [W-1:0] din,
  output logic         rout,
  input  logic         aout,
  output logic [W-1:0] dout
);
  // top row: t_r[i] / t_a[i] / t_d[i] is the channel into top cell i;
  // channel CELLS is the U-turn into the last bottom cell.
  logic [CELLS:0]   t_r, t_a;
  logic [W-1:0]     t_d [CELLS+1];
  // jumps: top cell i -> bottom cell i
  logic [CELLS-1:0] j_r, j_a;
  logic [W-1:0]     j_d [CELLS];
  // bottom row: b_r[i] / b_a[i] / b_d[i] is the channel out of bottom cell i;
  // b_*[CELLS] aliases the U-turn.
  logic [CELLS:0]   b_r, b_a;
  logic [W-1:0]     b_d [CELLS+1];
  // full status
  logic [CELLS-1:0] t_full, go_right;
  logic [CELLS:0]   t_chain, b_chain;

  assign t_r[0] = rin;
  assign ain    = t_a[0];
  assign t_d[0] = din;

  assign b_r[CELLS]     = t_r[CELLS];
  assign t_a[CELLS]     = b_a[CELLS];
  assign b_d[CELLS]     = t_d[CELLS];
  assign t_chain[CELLS] = 1'b0;
  assign b_chain[CELLS] = 1'b0;

  assign rout   = b_r[0];
  assign b_a[0] = aout;
  assign dout   = b_d[0];

  for (genvar i = 0; i < CELLS; i++) begin : g_cell
    assign t_chain[i] = t_full[i] | t_chain[i+1];

    if (!LATCH_FIRST) begin : g_rule1
      assign go_right[i] = t_chain[i] | b_chain[i];
    end else begin : g_rule2
      assign go_right[i] = t_chain[i+1] | b_chain[i];
    end

    fold_top_cell #(.W(W), .LATCH_FIRST(LATCH_FIRST)) u_top (
      .clr(clr),
      .rin(t_r[i]), .ain(t_a[i]), .din(t_d[i]),
      .rout(t_r[i+1]), .aout(t_a[i+1]), .dout(t_d[i+1]),
      .rdown(j_r[i]), .adown(j_a[i]), .ddown(j_d[i]),
      .go_right(go_right[i]), .full(t_full[i])
    );

    fold_bot_cell #(.W(W)) u_bot (
      .clr(clr),
      .rr(b_r[i+1]), .ar(b_a[i+1]), .dr(b_d[i+1]),
      .rt(j_r[i]), .at(j_a[i]), .dt(j_d[i]),
      .rout(b_r[i]), .aout(b_a[i]), .dout(b_d[i]),
      .fi(b_chain[i+1]), .fo(b_chain[i])
    );
  end
endmodule
