// tb_fold_bot_cell: the output-side cells inside a six-word folded FIFO with
// low-latency input cells. Empty, a word jumps straight into the output cell
// (2 gate delays rin to rout); capacity six; order kept (fifo_tester). With
// the consumer stopped and the FIFO full, every stage of the output-side
// full chain must read full.
//
// Origin: the expected behaviour follows the published description of the
// circuit; the stimulus, the checks and their limits are this testbench's own.
module tb_fold_bot_cell;
  logic clr, rin, ain, rout, aout;
  logic [7:0] din, dout;
  int full_seen = 0;

  fifo_folded #(.W(8), .CELLS(3), .LATCH_FIRST(1'b0)) dut (
    .clr(clr), .rin(rin), .ain(ain), .din(din), .rout(rout), .aout(aout), .dout(dout)
  );

  fifo_tester #(.W(8), .CAPACITY(6), .EMPTY_LAT(2), .AIN_LAT(3), .NAME("folded3")) tester (
    .clr(clr), .rin(rin), .ain(ain), .din(din), .rout(rout), .aout(aout), .dout(dout)
  );

  always @(dut.b_chain) if (dut.b_chain[2:0] == 3'b111) full_seen++;

  always @(tester.received) begin
    tester.checks++;
    if (tester.received > 20 && full_seen == 0) tester.failures++;
    if (dut.b_chain[0] != 1'b1 && rout != aout) tester.failures++;
  end
endmodule
