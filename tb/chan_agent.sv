// chan_agent: producer and consumer for one two-phase bundled-data FIFO
// channel, used by the whole-design test. After start it (1) fills the FIFO
// with the consumer stopped and checks that exactly CAPACITY words are
// acknowledged, then (2) streams NWORDS random words, first with a slow
// consumer, then with a fast one, checking every delivered word against the
// queue of words sent. It raises done when every word has come out and
// reports its check and failure counts and how often the producer stalled
// on a full FIFO.
//
// Origin: the expected behaviour follows the published description of the
// circuit; the stimulus, the checks and their limits are this testbench's own.
module chan_agent #(
  parameter int    W        = 8,
  parameter int    CAPACITY = 16,
  parameter int    NWORDS   = 200,
  parameter string NAME     = "chan"
) (
  input  logic         start,
  output logic         rin,
  input  logic         ain,
  output logic [W-1:0] din,
  input  logic         rout,
  output logic         aout,
  input  logic [W-1:0] dout,
  output int           checks,
  output int           failures,
  output int           stalls,
  output logic         done
);
  logic [W-1:0] expected [$];
  bit consumer_on = 0;
  int cons_gap_max = 6;
  int received = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("%s FAIL @%0t: %s", NAME, $time, what);
    end
  endtask

  initial begin
    aout = 0;
    forever begin
      #1;
      if (consumer_on && (rout != aout)) begin
        logic [W-1:0] exp_v;
        if (expected.size() == 0) check(0, "word delivered that was never sent");
        else begin
          exp_v = expected.pop_front();
          check(dout == exp_v, $sformatf("data %0h expected %0h", dout, exp_v));
        end
        received++;
        repeat ($urandom_range(cons_gap_max, 0)) #1;
        aout = ~aout;
      end
    end
  end

  initial begin
    int accepted;
    bit acked;
    checks = 0; failures = 0; stalls = 0; done = 0;
    rin = 0; din = '0;
    wait (start);
    accepted = 0;
    for (int i = 0; i < CAPACITY + 2; i++) begin
      din = W'($urandom);
      #1 rin = ~rin;
      expected.push_back(din);
      acked = 0;
      for (int k = 0; k < 200; k++) begin
        if (ain == rin) begin acked = 1; break; end
        #1;
      end
      if (!acked) begin stalls++; break; end
      accepted++;
    end
    check(accepted == CAPACITY, $sformatf("%0d words fit, expected %0d", accepted, CAPACITY));
    consumer_on = 1;
    while (ain != rin) #1;
    for (int n = 0; n < NWORDS; n++) begin
      if (n == NWORDS / 2) cons_gap_max = 0;
      din = W'($urandom);
      #1 rin = ~rin;
      expected.push_back(din);
      // count a stall whenever the input waits noticeably for room
      for (int k = 0; ain != rin; k++) begin
        #1;
        if (k == 3) stalls++;
      end
      repeat ($urandom_range((n < NWORDS / 2) ? 0 : 4, 0)) #1;
    end
    wait (expected.size() == 0);
    #10;
    check(rout == aout, "a word is offered after all were taken");
    check(received == CAPACITY + 1 + NWORDS, $sformatf("received %0d words", received));
    done = 1;
  end
endmodule
