// tb_merge: a transition on any one of three inputs must produce exactly one
// transition on the output.
//
// Origin: the expected behaviour follows the published description of the
// circuit; the stimulus, the checks and their limits are this testbench's own.
module tb_merge;
  logic [2:0] t;
  logic y, y_prev;
  int checks = 0, failures = 0;

  merge #(.N(3)) dut (.t(t), .y(y));

  initial begin
    #5000 $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    t = '0;
    #1;
    checks++; if (y !== 1'b0) failures++;
    for (int i = 0; i < 200; i++) begin
      y_prev = y;
      t[$urandom_range(2, 0)] ^= 1'b1;
      #1;
      checks++;
      if (y == y_prev) begin failures++; $display("FAIL: no output transition, t=%b", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
