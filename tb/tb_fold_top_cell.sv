// tb_fold_top_cell: the latch-first input-side cell (LATCH_FIRST = 1) inside
// a four-word folded FIFO. A word in an empty FIFO passes two latches (3 gate
// delays from rin to rout) and the input is acknowledged after one; capacity
// is four and words stay in order (fifo_tester). Jumps into both bottom cells
// must occur.
//
// Origin: the expected behaviour follows the published description of the
// circuit; the stimulus, the checks and their limits are this testbench's own.
module tb_fold_top_cell;
  logic clr, rin, ain, rout, aout;
  logic [7:0] din, dout;
  int jumps0 = 0, jumps1 = 0;

  fifo_folded #(.W(8), .CELLS(2), .LATCH_FIRST(1'b1)) dut (
    .clr(clr), .rin(rin), .ain(ain), .din(din), .rout(rout), .aout(aout), .dout(dout)
  );

  always @(dut.j_r[0]) if (!clr) jumps0++;
  always @(dut.j_r[1]) if (!clr) jumps1++;

  fifo_tester #(.W(8), .CAPACITY(4), .EMPTY_LAT(3), .AIN_LAT(1), .NAME("folded2_latch_first")) tester (
    .clr(clr), .rin(rin), .ain(ain), .din(din), .rout(rout), .aout(aout), .dout(dout)
  );

  always @(tester.received) begin
    tester.checks++;
    if (tester.received > 100 && (jumps0 == 0 || jumps1 == 0)) tester.failures++;
  end
endmodule
