// tb_fifo_parallel: self-checking test of the four-way parallel FIFO
// at its full size (sixteen 8-bit words). fifo_tester checks the empty-FIFO
// latency (7 gate delays rin->rout, 3 rin->ain), that exactly 16 words
// fit with the output stopped, and ordered random streaming.
//
// Origin: the expected behaviour follows the published description of the
// circuit; the stimulus, the checks and their limits are this testbench's own.
module tb_fifo_parallel;
  logic clr, rin, ain, rout, aout;
  logic [7:0] din, dout;

  fifo_parallel #(.W(8), .DEPTH(16), .WAYS(4)) dut (
    .clr(clr), .rin(rin), .ain(ain), .din(din), .rout(rout), .aout(aout), .dout(dout)
  );

  fifo_tester #(.W(8), .CAPACITY(16), .EMPTY_LAT(7), .AIN_LAT(3), .NAME("parallel")) tester (
    .clr(clr), .rin(rin), .ain(ain), .din(din), .rout(rout), .aout(aout), .dout(dout)
  );
endmodule
