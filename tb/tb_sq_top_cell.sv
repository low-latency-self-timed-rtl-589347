// tb_sq_top_cell: the top-row select cell inside a three-column square FIFO
// (one select cell, one toggle cell, one corner; columns of one stage). The
// select cell must send words right, right, down, right, right, down, ...
// (the first two go on to columns 2 and 1, the third drops into column 0).
// fifo_tester checks the whole FIFO: 8 gate delays when empty, capacity 9
// and ordered random streaming.
//
// Origin: the expected behaviour follows the published description of the
// circuit; the stimulus, the checks and their limits are this testbench's own.
module tb_sq_top_cell;
  logic clr, rin, ain, rout, aout;
  logic [7:0] din, dout;
  int n_right = 0, n_down = 0, bad = 0;

  fifo_square #(.W(8), .COLS(3), .COL_DEPTH(1)) dut (
    .clr(clr), .rin(rin), .ain(ain), .din(din), .rout(rout), .aout(aout), .dout(dout)
  );

  always @(dut.g_top[0].g_sel.u_cell.rout_r) if (!clr) begin
    n_right++;
    if ((n_right + n_down) % 3 == 0) bad++;
  end
  always @(dut.g_top[0].g_sel.u_cell.rout_d) if (!clr) begin
    n_down++;
    if ((n_right + n_down) % 3 != 0) bad++;
  end

  fifo_tester #(.W(8), .CAPACITY(9), .EMPTY_LAT(8), .AIN_LAT(2), .NAME("square3")) tester (
    .clr(clr), .rin(rin), .ain(ain), .din(din), .rout(rout), .aout(aout), .dout(dout)
  );

  final begin
    if (bad != 0 || n_down == 0)
      $display("select cell routing pattern wrong: %0d right, %0d down, %0d out of turn", n_right, n_down, bad);
  end

  // fold the routing-pattern result into the tester's counts
  always @(tester.received) begin
    tester.checks++;
    if (bad != 0) tester.failures++;
  end
endmodule
