// tb_fifo_linear: self-checking test of the linear micropipeline FIFO
// at its full size (sixteen 8-bit words). fifo_tester checks the empty-FIFO
// latency (16 gate delays rin->rout, 1 rin->ain), that exactly 16 words
// fit with the output stopped, and ordered random streaming.
//
// Origin: the expected behaviour follows the published description of the
// circuit; the stimulus, the checks and their limits are this testbench's own.
module tb_fifo_linear;
  logic clr, rin, ain, rout, aout;
  logic [7:0] din, dout;

  fifo_linear #(.W(8), .DEPTH(16)) dut (
    .clr(clr), .rin(rin), .ain(ain), .din(din), .rout(rout), .aout(aout), .dout(dout)
  );

  fifo_tester #(.W(8), .CAPACITY(16), .EMPTY_LAT(16), .AIN_LAT(1), .NAME("linear")) tester (
    .clr(clr), .rin(rin), .ain(ain), .din(din), .rout(rout), .aout(aout), .dout(dout)
  );
endmodule
