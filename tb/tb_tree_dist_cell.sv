// tb_tree_dist_cell: one toggle-distribute cell feeding two consumers. The
// cell must latch each word, acknowledge the input within two gate delays of the
// request, and offer the words alternately to output 0 and output 1 with the
// right data; it must hold at most one word.
//
// Origin: the expected behaviour follows the published description of the
// circuit; the stimulus, the checks and their limits are this testbench's own.
module tb_tree_dist_cell;
  logic clr, rin, ain, rout0, aout0, rout1, aout1;
  logic [7:0] din, dout;
  int checks = 0, failures = 0;
  localparam int NW = 200;

  tree_dist_cell #(.W(8)) dut (
    .clr(clr), .rin(rin), .ain(ain), .din(din),
    .rout0(rout0), .aout0(aout0), .rout1(rout1), .aout1(aout1), .dout(dout)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #20000 $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    clr = 1; rin = 0; din = '0; aout0 = 0; aout1 = 0;
    #3 clr = 0;
    #3;
    for (int i = 0; i < NW; i++) begin
      din = 8'(i * 5 + 1);
      #1 rin = ~rin;
      #2;
      check(ain == rin, "input not acknowledged within two gate delays");
      din = 8'hFF;
      #1;
      if (i % 2 == 0) check(rout0 != aout0 && rout1 == aout1, $sformatf("word %0d not on output 0", i));
      else            check(rout1 != aout1 && rout0 == aout0, $sformatf("word %0d not on output 1", i));
      check(dout == 8'(i * 5 + 1), $sformatf("word %0d data %0h", i, dout));
      if (i % 4 == 3) begin
        // second word must wait while the first is still held
        din = 8'hEE;
        #1 rin = ~rin;
        #4;
        check(ain != rin, "accepted a word while full");
        rin = ~rin;
        #1;
      end
      #($urandom_range(3, 0));
      if (i % 2 == 0) aout0 = ~aout0; else aout1 = ~aout1;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
