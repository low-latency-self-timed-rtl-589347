// tb_toggle_n: a four-way and an eight-way Toggle must send input
// transitions to their outputs strictly in turn: transition i goes to output
// i mod N, and nowhere else.
//
// Origin: the expected behaviour follows the published description of the
// circuit; the stimulus, the checks and their limits are this testbench's own.
module tb_toggle_n;
  logic clr, t;
  logic [3:0] o4, o4_prev;
  logic [7:0] o8, o8_prev;
  int checks = 0, failures = 0;

  toggle_n #(.N(4)) dut4 (.clr(clr), .t(t), .o(o4));
  toggle_n #(.N(8)) dut8 (.clr(clr), .t(t), .o(o8));

  initial begin
    #5000 $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    clr = 1; t = 0;
    #3 clr = 0;
    #3;
    for (int i = 0; i < 64; i++) begin
      o4_prev = o4; o8_prev = o8;
      t = ~t;
      #5;
      checks += 2;
      if ((o4 ^ o4_prev) != 4'(1 << (i % 4))) begin
        failures++; $display("FAIL N=4 transition %0d changed %b", i, o4 ^ o4_prev);
      end
      if ((o8 ^ o8_prev) != 8'(1 << (i % 8))) begin
        failures++; $display("FAIL N=8 transition %0d changed %b", i, o8 ^ o8_prev);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
