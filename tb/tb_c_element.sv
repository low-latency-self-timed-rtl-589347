// tb_c_element: checks the C-element against a reference model: after every
// random change of a or b the output must equal the inputs when they agree
// and keep its previous value when they differ. Both the plain and the
// half-cocked (inverted b) variants are checked, as is the one-gate delay.
//
// Origin: the expected behaviour follows the published description of the
// circuit; the stimulus, the checks and their limits are this testbench's own.
module tb_c_element;
  logic clr, a, b, c_plain, c_inv;
  logic ref_plain, ref_inv;
  int checks = 0, failures = 0;

  c_element #(.INV_B(1'b0)) dut_plain (.clr(clr), .a(a), .b(b), .c(c_plain));
  c_element #(.INV_B(1'b1)) dut_inv   (.clr(clr), .a(a), .b(b), .c(c_inv));

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
    clr = 1; a = 0; b = 0; ref_plain = 0; ref_inv = 0;
    #3 clr = 0;
    #3;
    check(c_plain == 0 && c_inv == 0, "not cleared");
    // half-cocked: a alone fires the inverted variant
    a = 1;
    #0;
    check(c_inv == 0, "output changed with no gate delay");
    #1;
    check(c_inv == 1 && c_plain == 0, "a alone: inverted variant must fire, plain must hold");
    ref_inv = 1;
    for (int i = 0; i < 300; i++) begin
      if ($urandom_range(1, 0)) a = ~a; else b = ~b;
      if (a == b)  ref_plain = a;
      if (a == !b) ref_inv = a;
      #2;
      check(c_plain == ref_plain, $sformatf("plain: a=%b b=%b c=%b", a, b, c_plain));
      check(c_inv == ref_inv, $sformatf("inverted: a=%b b=%b c=%b", a, b, c_inv));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
