// fifo_square: square self-timed flow-through FIFO.
//
// A top row of COLS cells distributes words into COLS vertical linear FIFOs
// of COL_DEPTH stages, and a bottom row of COLS cells collects them; every
// word takes an L-shaped path. The first word after clear travels to the
// rightmost column, the next to the column left of it, and so on; the bottom
// row takes them back in the same order and delivers them at its right end.
//
// Top row, left to right: sq_top_cell select cells, one toggle-distribute
// cell (tree_dist_cell) whose Toggle outputs are also its ALR/ALD
// acknowledges, and a plain fifo_stage corner that always drops into the last
// column. Bottom row, left to right: a plain fifo_stage corner fed only by
// column 0, a toggle-merge cell (tree_merge_cell, column first) whose acks
// ain0/ain1 double as ROUTH/ROUTV, and sq_bot_cell select cells.
//
// Capacity is 2 * COLS + COLS * COL_DEPTH words (16 with the defaults). A
// word bound for column k passes k + 1 top cells, COL_DEPTH column stages
// and COLS - k bottom cells: always COLS + 1 + COL_DEPTH cells (7).
// COLS >= 2. Two-phase bundled-data channels; clr (active high) empties it.
//
// Origin: the published square FIFO and its cell types; the column depth
// of two (giving sixteen words) is this design's choice.
module fifo_square #(
  parameter int W         = 8,
  parameter int COLS      = 4,
  parameter int COL_DEPTH = 2
) (
  input  logic         clr,
  input  logic         rin,
  output logic         ain,
  input  logic [W-1:0] din,
  output logic         rout,
  input  logic         aout,
  output logic [W-1:0] dout
);
  if (COLS < 2) begin : g_bad_cols
    $error("fifo_square: COLS must be at least 2");
  end

  // top row: t_r[k] is the request into top cell k, t_alr/t_ald[k] its acks
  logic [COLS-1:0]  t_r, t_alr, t_ald;
  logic [W-1:0]     t_d [COLS];
  // columns
  logic [COLS-1:0]  c_rin, c_ain, c_rout, c_aout;
  logic [W-1:0]     c_din [COLS];
  logic [W-1:0]     c_dout [COLS];
  // bottom row: b_rh/b_rv[k] requests out of bottom cell k, b_a[k] its ack
  logic [COLS-1:0]  b_rh, b_rv, b_a;
  logic [W-1:0]     b_d [COLS];

  assign t_r[0] = rin;
  assign t_d[0] = din;
  assign ain    = t_alr[0] ^ t_ald[0];

  // ---------------- top row ----------------
  for (genvar k = 0; k < COLS; k++) begin : g_top
    if (k < COLS - 2) begin : g_sel
      sq_top_cell #(.W(W)) u_cell (
        .clr(clr),
        .rin(t_r[k]), .ain_r(t_alr[k]), .ain_d(t_ald[k]), .din(t_d[k]),
        .rout_r(t_r[k+1]), .arr(t_alr[k+1]), .ard(t_ald[k+1]),
        .rout_d(c_rin[k]), .ad(c_ain[k]), .dout(t_d[k+1])
      );
      assign c_din[k] = t_d[k+1];
    end else if (k == COLS - 2) begin : g_tog
      // The cell's single acknowledge is rebuilt below as ALR/ALD, one wire
      // per output branch, so its combined ain is not needed.
      logic tog_ain;
      tree_dist_cell #(.W(W)) u_cell (
        .clr(clr), .rin(t_r[k]), .ain(tog_ain), .din(t_d[k]),
        .rout0(t_r[k+1]), .aout0(t_alr[k+1]),
        .rout1(c_rin[k]), .aout1(c_ain[k]), .dout(t_d[k+1])
      );
      assign t_alr[k]  = t_r[k+1];
      assign t_ald[k]  = c_rin[k];
      assign c_din[k]  = t_d[k+1];
    end else begin : g_corner
      logic corner_full;
      fifo_stage #(.W(W)) u_cell (
        .clr(clr), .rin(t_r[k]), .ain(t_alr[k]), .din(t_d[k]),
        .rout(c_rin[k]), .aout(c_ain[k]), .dout(c_din[k]), .full(corner_full)
      );
      assign t_ald[k] = 1'b0;
    end
  end

  // ---------------- columns ----------------
  for (genvar k = 0; k < COLS; k++) begin : g_col
    fifo_linear #(.W(W), .DEPTH(COL_DEPTH)) u_col (
      .clr(clr), .rin(c_rin[k]), .ain(c_ain[k]), .din(c_din[k]),
      .rout(c_rout[k]), .aout(c_aout[k]), .dout(c_dout[k])
    );
  end

  // ---------------- bottom row ----------------
  for (genvar k = 0; k < COLS; k++) begin : g_bot
    if (k == 0) begin : g_corner
      logic corner_full;
      fifo_stage #(.W(W)) u_cell (
        .clr(clr), .rin(c_rout[0]), .ain(c_aout[0]), .din(c_dout[0]),
        .rout(b_rh[0]), .aout(b_a[0]), .dout(b_d[0]), .full(corner_full)
      );
      assign b_rv[0] = 1'b0;
    end else if (k == 1) begin : g_tog
      logic cell_rout;
      tree_merge_cell #(.W(W)) u_cell (
        .clr(clr),
        .rin0(c_rout[1]), .ain0(c_aout[1]), .din0(c_dout[1]),
        .rin1(b_rh[0] ^ b_rv[0]), .ain1(b_a[0]), .din1(b_d[0]),
        .rout(cell_rout), .aout(b_a[1]), .dout(b_d[1])
      );
      assign b_rh[1] = c_aout[1];
      assign b_rv[1] = b_a[0];
    end else begin : g_sel
      sq_bot_cell #(.W(W)) u_cell (
        .clr(clr),
        .rinh(b_rh[k-1]), .rinv(b_rv[k-1]), .ainl(b_a[k-1]), .dinl(b_d[k-1]),
        .rint(c_rout[k]), .aint(c_aout[k]), .dint(c_dout[k]),
        .routh(b_rh[k]), .routv(b_rv[k]), .aout(b_a[k]), .dout(b_d[k])
      );
    end
  end

  assign rout         = b_rh[COLS-1] ^ b_rv[COLS-1];
  assign b_a[COLS-1]  = aout;
  assign dout         = b_d[COLS-1];
endmodule
