// fifo_parallel: parallel self-timed flow-through FIFO.
//
// Words are dealt out in turn to WAYS linear FIFOs of DEPTH/WAYS stages each
// by par_distribute and collected in the same order by par_merge, so a word
// passes only DEPTH/WAYS latches instead of DEPTH. The distribute and merge
// circuits hold no data; capacity is DEPTH words. Two-phase bundled-data
// channels on both sides; clr (active high) empties it.
//
// Origin: the published sixteen-deep four-way parallel FIFO.
module fifo_parallel #(
  parameter int W     = 8,
  parameter int DEPTH = 16,
  parameter int WAYS  = 4
) (
  input  logic         clr,
  input  logic         rin,
  output logic         ain,
  input  logic [W-1:0] din,
  output logic         rout,
  input  logic         aout,
  output logic [W-1:0] dout
);
  localparam int ARM = DEPTH / WAYS;

  if (DEPTH % WAYS != 0) begin : g_bad_depth
    $error("fifo_parallel: DEPTH must be a multiple of WAYS");
  end

  logic [WAYS-1:0]         arm_rin, arm_ain, arm_rout, arm_aout;
  logic [WAYS-1:0][W-1:0]  arm_dout;

  par_distribute #(.N(WAYS)) u_dist (
    .clr(clr), .rin(rin), .ain(ain), .rout(arm_rin), .aout(arm_ain)
  );

  for (genvar i = 0; i < WAYS; i++) begin : g_arm
    fifo_linear #(.W(W), .DEPTH(ARM)) u_arm (
      .clr(clr), .rin(arm_rin[i]), .ain(arm_ain[i]), .din(din),
      .rout(arm_rout[i]), .aout(arm_aout[i]), .dout(arm_dout[i])
    );
  end

  par_merge #(.W(W), .N(WAYS)) u_merge (
    .clr(clr), .rin(arm_rout), .ain(arm_aout), .din(arm_dout),
    .rout(rout), .aout(aout), .dout(dout)
  );
endmodule
