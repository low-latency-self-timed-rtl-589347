// tb_fifo_square: self-checking test of the square FIFO (four columns of two stages)
// at its full size (sixteen 8-bit words). fifo_tester checks the empty-FIFO
// latency (11 gate delays rin->rout, 2 rin->ain), that exactly 16 words
// fit with the output stopped, and ordered random streaming.
//
// Origin: the expected behaviour follows the published description of the
// circuit; the stimulus, the checks and their limits are this testbench's own.
module tb_fifo_square;
  logic clr, rin, ain, rout, aout;
  logic [7:0] din, dout;

  fifo_square #(.W(8), .COLS(4), .COL_DEPTH(2)) dut (
    .clr(clr), .rin(rin), .ain(ain), .din(din), .rout(rout), .aout(aout), .dout(dout)
  );

  fifo_tester #(.W(8), .CAPACITY(16), .EMPTY_LAT(11), .AIN_LAT(2), .NAME("square")) tester (
    .clr(clr), .rin(rin), .ain(ain), .din(din), .rout(rout), .aout(aout), .dout(dout)
  );
endmodule
