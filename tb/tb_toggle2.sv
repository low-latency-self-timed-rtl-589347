// tb_toggle2: input transitions must appear alternately on o0 and o1,
// starting with o0, one gate delay later.
//
// Origin: the expected behaviour follows the published description of the
// circuit; the stimulus, the checks and their limits are this testbench's own.
module tb_toggle2;
  logic clr, t, o0, o1;
  int n0 = 0, n1 = 0, checks = 0, failures = 0;

  toggle2 dut (.clr(clr), .t(t), .o0(o0), .o1(o1));

  always @(o0) if (!clr) n0++;
  always @(o1) if (!clr) n1++;

  initial begin
    #5000 $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    clr = 1; t = 0;
    #3 clr = 0;
    #3;
    for (int i = 1; i <= 100; i++) begin
      t = ~t;
      #2;
      checks++;
      if (n0 != (i + 1) / 2 || n1 != i / 2) begin
        failures++;
        $display("FAIL after %0d transitions: o0 %0d times, o1 %0d times", i, n0, n1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
