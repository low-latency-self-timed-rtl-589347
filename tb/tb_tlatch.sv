// tb_tlatch: transition latch. Empty (c == p) it must be transparent; a
// capture transition must freeze the data and raise full; a pass transition
// must make it transparent again and only then report pass-done.
//
// Origin: the expected behaviour follows the published description of the
// circuit; the stimulus, the checks and their limits are this testbench's own.
module tb_tlatch;
  logic clr, c, p, cd, pd, full;
  logic [7:0] d, q, held;
  int checks = 0, failures = 0;

  tlatch #(.W(8)) dut (.clr(clr), .c(c), .p(p), .d(d), .q(q), .cd(cd), .pd(pd), .full(full));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #5000 $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    clr = 1; c = 0; p = 0; d = 8'h00;
    #3 clr = 0;
    for (int i = 0; i < 100; i++) begin
      d = 8'($urandom);
      #1;
      check(q == d && !full, "empty latch not transparent");
      held = d;
      c = ~c;
      #1;
      check(full && cd == c, "capture not reported");
      d = 8'($urandom);
      #1;
      check(q == held, "full latch did not hold");
      check(pd == p, "pass-done changed without a pass");
      p = ~p;
      #1;
      check(!full && pd == p && q == d, "pass did not reopen the latch");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
