// tb_sq_bot_cell: the bottom-row select cells inside a five-column square
// FIFO (three select cells per row; columns of one stage). The last bottom
// cell must send ROUTH, ROUTH, ROUTH, ROUTH, ROUTV, ... (one word from its
// own column, then three from the left with RINH, then the fifth with RINV).
// fifo_tester checks the whole FIFO: 12 gate delays when empty, capacity 15
// and ordered random streaming.
//
// Origin: the expected behaviour follows the published description of the
// circuit; the stimulus, the checks and their limits are this testbench's own.
module tb_sq_bot_cell;
  logic clr, rin, ain, rout, aout;
  logic [7:0] din, dout;
  int n_h = 0, n_v = 0, bad = 0;

  fifo_square #(.W(8), .COLS(5), .COL_DEPTH(1)) dut (
    .clr(clr), .rin(rin), .ain(ain), .din(din), .rout(rout), .aout(aout), .dout(dout)
  );

  always @(dut.b_rh[4]) if (!clr) begin
    n_h++;
    if ((n_h + n_v) % 5 == 0) bad++;
  end
  always @(dut.b_rv[4]) if (!clr) begin
    n_v++;
    if ((n_h + n_v) % 5 != 0) bad++;
  end

  fifo_tester #(.W(8), .CAPACITY(15), .EMPTY_LAT(12), .AIN_LAT(2), .NAME("square5")) tester (
    .clr(clr), .rin(rin), .ain(ain), .din(din), .rout(rout), .aout(aout), .dout(dout)
  );

  always @(tester.received) begin
    tester.checks++;
    if (bad != 0) tester.failures++;
  end
endmodule
