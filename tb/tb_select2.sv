// tb_select2: every input transition must go to o0 when sel = 0 and to o1
// when sel = 1; sel is changed at random between transitions.
//
// Origin: the expected behaviour follows the published description of the
// circuit; the stimulus, the checks and their limits are this testbench's own.
module tb_select2;
  logic clr, t, sel, o0, o1, p0, p1;
  int checks = 0, failures = 0;

  select2 dut (.clr(clr), .t(t), .sel(sel), .o0(o0), .o1(o1));

  initial begin
    #5000 $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    clr = 1; t = 0; sel = 0;
    #3 clr = 0;
    #3;
    for (int i = 0; i < 200; i++) begin
      sel = 1'($urandom_range(1, 0));
      #1;
      p0 = o0; p1 = o1;
      t = ~t;
      #2;
      checks++;
      if (sel ? (o1 == p1 || o0 != p0) : (o0 == p0 || o1 != p1)) begin
        failures++; $display("FAIL: sel=%b routed to o0:%b o1:%b", sel, o0 != p0, o1 != p1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
