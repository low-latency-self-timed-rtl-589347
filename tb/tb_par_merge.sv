// tb_par_merge: four producers offer words at random times; producer i owns
// words i, i+4, i+8, ... The merge must deliver 0, 1, 2, ... in order with the
// right data, acknowledge each producer only after its word was taken, and
// never offer a word before its producer did.
//
// Origin: the expected behaviour follows the published description of the
// circuit; the stimulus, the checks and their limits are this testbench's own.
module tb_par_merge;
  logic clr, rout, aout;
  logic [3:0] rin, ain;
  logic [3:0][7:0] din;
  logic [7:0] dout;
  int checks = 0, failures = 0;
  int next_out = 0;
  localparam int NW = 200;

  par_merge #(.W(8), .N(4)) dut (
    .clr(clr), .rin(rin), .ain(ain), .din(din), .rout(rout), .aout(aout), .dout(dout)
  );

  initial begin
    #20000 $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  for (genvar i = 0; i < 4; i++) begin : g_prod
    initial begin
      rin[i] = 0; din[i] = '0;
      wait (!clr);
      for (int k = i; k < NW; k += 4) begin
        #($urandom_range(6, 1));
        din[i] = 8'(k * 7 + 3);
        #1 rin[i] = ~rin[i];
        wait (ain[i] == rin[i]);
      end
    end
  end

  initial begin
    clr = 1; aout = 0;
    #3 clr = 0;
    while (next_out < NW) begin
      #1;
      if (rout != aout) begin
        checks++;
        if (dout != 8'(next_out * 7 + 3)) begin
          failures++; $display("FAIL: word %0d data %0h", next_out, dout);
        end
        next_out++;
        #($urandom_range(3, 0));
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
