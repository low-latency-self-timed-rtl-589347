// tb_call2: two clients take turns at random to call a shared resource. Each
// call must reach the resource as one request, and the resource's
// acknowledge must return only to the client that called.
//
// Origin: the expected behaviour follows the published description of the
// circuit; the stimulus, the checks and their limits are this testbench's own.
module tb_call2;
  logic clr, r0, r1, r, a, a0, a1, busy;
  logic pr, p0, p1;
  int checks = 0, failures = 0;

  call2 dut (.clr(clr), .r0(r0), .r1(r1), .r(r), .a(a), .a0(a0), .a1(a1), .client1_busy(busy));

  initial begin
    #5000 $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    bit who;
    clr = 1; r0 = 0; r1 = 0; a = 0;
    #3 clr = 0;
    #3;
    for (int i = 0; i < 200; i++) begin
      who = 1'($urandom_range(1, 0));
      pr = r; p0 = a0; p1 = a1;
      if (who) r1 = ~r1; else r0 = ~r0;
      #1;
      checks += 2;
      if (r == pr) begin failures++; $display("FAIL: request not passed on"); end
      if (busy != who) begin failures++; $display("FAIL: client1_busy=%b for client %0d", busy, who); end
      a = ~a;
      #2;
      checks++;
      if (who ? (a1 == p1 || a0 != p0) : (a0 == p0 || a1 != p1)) begin
        failures++; $display("FAIL: ack for client %0d went to a0:%b a1:%b", who, a0 != p0, a1 != p1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
