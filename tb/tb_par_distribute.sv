// tb_par_distribute: requests must be dealt to the four outputs in turn
// (0, 1, 2, 3, 0, ...), two Toggle delays after the input request, and each
// output's acknowledge must come back as one input acknowledge.
//
// Origin: the expected behaviour follows the published description of the
// circuit; the stimulus, the checks and their limits are this testbench's own.
module tb_par_distribute;
  logic clr, rin, ain, pain;
  logic [3:0] rout, aout, prev;
  int checks = 0, failures = 0;

  par_distribute #(.N(4)) dut (.clr(clr), .rin(rin), .ain(ain), .rout(rout), .aout(aout));

  initial begin
    #5000 $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    clr = 1; rin = 0; aout = '0;
    #3 clr = 0;
    #3;
    for (int i = 0; i < 80; i++) begin
      prev = rout; pain = ain;
      rin = ~rin;
      #1;
      checks++;
      if (rout != prev) begin failures++; $display("FAIL: request passed with no Toggle delay"); end
      #2;
      checks++;
      if ((rout ^ prev) != 4'(1 << (i % 4))) begin
        failures++; $display("FAIL: request %0d went to %b", i, rout ^ prev);
      end
      #($urandom_range(3, 0));
      aout[i % 4] = ~aout[i % 4];
      #1;
      checks++;
      if (ain == pain) begin failures++; $display("FAIL: ack %0d not merged", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
