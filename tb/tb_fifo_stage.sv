// tb_fifo_stage: one micropipeline stage as a one-word FIFO: one gate delay
// from request to output request and to input acknowledge, capacity one, and
// ordered random streaming (fifo_tester).
//
// Origin: the expected behaviour follows the published description of the
// circuit; the stimulus, the checks and their limits are this testbench's own.
module tb_fifo_stage;
  logic clr, rin, ain, rout, aout, full;
  logic [7:0] din, dout;

  fifo_stage #(.W(8)) dut (
    .clr(clr), .rin(rin), .ain(ain), .din(din), .rout(rout), .aout(aout), .dout(dout), .full(full)
  );

  fifo_tester #(.W(8), .CAPACITY(1), .NWORDS(300), .EMPTY_LAT(1), .AIN_LAT(1), .NAME("stage")) tester (
    .clr(clr), .rin(rin), .ain(ain), .din(din), .rout(rout), .aout(aout), .dout(dout)
  );
endmodule
