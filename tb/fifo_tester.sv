// fifo_tester: reusable stimulus and scoreboard for a two-phase
// bundled-data FIFO.
//
// It plays both the producer and the consumer of the FIFO under test and
// prints the TB_RESULT line. The sequence is:
//   1. clear, then one word into the empty FIFO: the time from rin to rout
//      (latency) and from rin to ain (input cycle) are measured in gate
//      delays and compared with EMPTY_LAT and AIN_LAT when these are >= 0;
//   2. fill with the consumer stopped: exactly CAPACITY words must be
//      acknowledged before the producer stalls;
//   3. drain and stream NWORDS random words with random producer and consumer
//      gaps in three phases (consumer slow, balanced, consumer fast), checking
//      every word against a queue of the words sent.
// Protocol monitors count a failure when rout toggles again before aout
// answered, when dout changes while a word is offered, or when ain toggles
// with no request outstanding. A watchdog ends the run after MAX_TIME.
//
// Origin: the expected behaviour follows the published description of the
// circuit; the stimulus, the checks and their limits are this testbench's own.
module fifo_tester #(
  parameter int    W        = 8,
  parameter int    CAPACITY = 16,
  parameter int    NWORDS   = 600,
  parameter int    MAX_TIME = 200000,
  parameter int    EMPTY_LAT = -1,
  parameter int    AIN_LAT   = -1,
  parameter string NAME     = "fifo"
) (
  output logic         clr,
  output logic         rin,
  input  logic         ain,
  output logic [W-1:0] din,
  input  logic         rout,
  output logic         aout,
  input  logic [W-1:0] dout
);
  int checks = 0;
  int failures = 0;
  int stalls = 0;
  logic [W-1:0] expected [$];
  bit consumer_on = 0;
  int cons_gap_max = 3;
  int prod_gap_max = 3;
  int received = 0;
  bit done = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("%s FAIL @%0t: %s", NAME, $time, what);
    end
  endtask

  // send one word; returns 1 if acknowledged within 'wait_max'
  task automatic send(input logic [W-1:0] v, input int wait_max, output bit acked);
    din = v;
    #1;
    rin = ~rin;
    expected.push_back(v);
    acked = 0;
    for (int i = 0; i <= wait_max; i++) begin
      if (ain == rin) begin acked = 1; break; end
      #1;
    end
  endtask

  task automatic wait_ack();
    while (ain != rin) #1;
  endtask

  // consumer
  initial begin
    aout = 0;
    forever begin
      #1;
      if (consumer_on && (rout != aout)) begin
        logic [W-1:0] exp_v;
        if (expected.size() == 0) begin
          check(0, "word delivered that was never sent");
        end else begin
          exp_v = expected.pop_front();
          check(dout == exp_v, $sformatf("data %0h expected %0h (word %0d)", dout, exp_v, received));
        end
        received++;
        repeat ($urandom_range(cons_gap_max, 0)) #1;
        aout = ~aout;
      end
    end
  end

  // protocol monitors
  logic rout_q = 0, ain_q = 0;
  logic [W-1:0] dout_q = '0;
  always @(rout) begin
    if (!clr && (rout_q != aout)) check(0, "rout toggled again before aout");
    rout_q = rout;
  end
  always @(dout) begin
    if (!clr && (rout != aout)) check(0, "dout changed while a word was offered");
    dout_q = dout;
  end
  always @(ain) begin
    if (!clr && (ain_q == rin)) check(0, "ain toggled with no request outstanding");
    ain_q = ain;
  end

  initial begin
    #(MAX_TIME);
    failures++;
    $display("%s watchdog expired", NAME);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit acked;
    int accepted;
    time t_start, t_ain, t_out;
    int lat_out, lat_ain;
    logic [W-1:0] v;
    clr = 1; rin = 0; din = '0;
    #5 clr = 0;
    #5;
    // 1. flow-through of an empty FIFO: zero time
    din = W'(8'hA5);
    #1;
    t_start = $time;
    rin = ~rin;
    expected.push_back(din);
    fork
      begin wait (ain == rin); t_ain = $time; end
      begin wait (rout != aout); t_out = $time; end
    join
    lat_out = int'(t_out - t_start);
    lat_ain = int'(t_ain - t_start);
    $display("%s: empty-FIFO latency rin->rout %0d, rin->ain %0d gate delays", NAME, lat_out, lat_ain);
    check(dout == din, "empty FIFO: wrong data at output");
    if (EMPTY_LAT >= 0) check(lat_out == EMPTY_LAT, $sformatf("latency %0d, expected %0d", lat_out, EMPTY_LAT));
    if (AIN_LAT >= 0) check(lat_ain == AIN_LAT, $sformatf("input cycle %0d, expected %0d", lat_ain, AIN_LAT));
    consumer_on = 1;
    wait (expected.size() == 0);
    consumer_on = 0;
    #10;
    // 2. capacity
    accepted = 0;
    for (int i = 0; i < CAPACITY + 4; i++) begin
      send(W'($urandom), 200, acked);
      if (!acked) break;
      accepted++;
    end
    stalls++;
    check(accepted == CAPACITY, $sformatf("accepted %0d words with output stopped, capacity %0d", accepted, CAPACITY));
    consumer_on = 1;
    wait_ack();
    // 3. streaming
    for (int ph = 0; ph < 3; ph++) begin
      cons_gap_max = (ph == 0) ? 6 : (ph == 1) ? 3 : 0;
      prod_gap_max = (ph == 0) ? 0 : (ph == 1) ? 3 : 6;
      for (int n = 0; n < NWORDS / 3; n++) begin
        v = W'($urandom);
        send(v, 0, acked);
        wait_ack();
        repeat ($urandom_range(prod_gap_max, 0)) #1;
      end
    end
    wait (expected.size() == 0);
    #20;
    check(rout == aout, "FIFO offers a word after all were taken");
    check(received == NWORDS / 3 * 3 + CAPACITY + 2, $sformatf("received %0d words", received));
    $display("%s: %0d words received, capacity %0d confirmed", NAME, received, accepted);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
