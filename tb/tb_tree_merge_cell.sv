// tb_tree_merge_cell: two producers, input 0 owning the even words and
// input 1 the odd ones, offer words at random times. The toggle-merge cell
// must deliver 0, 1, 2, ... in order with the right data, taking input 0
// first after clear, and acknowledge each producer only for its own words.
//
// Origin: the expected behaviour follows the published description of the
// circuit; the stimulus, the checks and their limits are this testbench's own.
module tb_tree_merge_cell;
  logic clr, rin0, ain0, rin1, ain1, rout, aout;
  logic [7:0] din0, din1, dout;
  int checks = 0, failures = 0;
  int next_out = 0;
  localparam int NW = 300;

  tree_merge_cell #(.W(8)) dut (
    .clr(clr), .rin0(rin0), .ain0(ain0), .din0(din0), .rin1(rin1), .ain1(ain1), .din1(din1),
    .rout(rout), .aout(aout), .dout(dout)
  );

  initial begin
    #20000 $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    rin0 = 0; din0 = '0;
    wait (!clr);
    for (int k = 0; k < NW; k += 2) begin
      #($urandom_range(5, 1));
      din0 = 8'(k * 3 + 11);
      #1 rin0 = ~rin0;
      wait (ain0 == rin0);
    end
  end

  initial begin
    rin1 = 0; din1 = '0;
    wait (!clr);
    for (int k = 1; k < NW; k += 2) begin
      #($urandom_range(5, 1));
      din1 = 8'(k * 3 + 11);
      #1 rin1 = ~rin1;
      wait (ain1 == rin1);
    end
  end

  initial begin
    clr = 1; aout = 0;
    #3 clr = 0;
    while (next_out < NW) begin
      #1;
      if (rout != aout) begin
        checks++;
        if (dout != 8'(next_out * 3 + 11)) begin
          failures++; $display("FAIL: word %0d data %0h", next_out, dout);
        end
        next_out++;
        #($urandom_range(4, 0));
        aout = ~aout;
      end
    end
    #10;
    checks++;
    if (rout != aout) begin failures++; $display("FAIL: extra word offered"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
