// tb_lowlat_fifos: whole-design test of lowlat_fifos at its default size.
//
// Five chan_agent instances drive the linear, parallel, tree, square and
// folded FIFOs at the same time, each through a full/stall phase and a
// random stream with slow and then fast consumers, and check capacity and
// word order. Monitors inside the design count each mechanism the FIFOs
// rely on; a mechanism that never happened counts as a failure:
//   - producer stalled on a full FIFO (every organization)
//   - parallel FIFO: words dealt to each of the four arms
//   - tree FIFO: the root distribute cell sending to both subtrees
//   - square FIFO: words dropped into each column; ROUTV requests in the
//     bottom row (the "take the next word from the column" switch)
//   - folded FIFO: jumps into bottom cell 0, jumps deeper in the FIFO, and
//     words that went all the way round the U-turn
// The empty-FIFO latencies (gate delays, rin to rout) are also measured and
// checked: 16, 7, 11, 11 and 2.
//
// Origin: the expected behaviour follows the published description of the
// circuit; the stimulus, the checks and their limits are this testbench's own.
module tb_lowlat_fifos;
  import fifo_pkg::*;

  localparam int NW = 240;

  logic                    clr, start;
  logic [N_ORGS-1:0]       rin, ain, rout, aout;
  logic [N_ORGS-1:0][7:0]  din, dout;
  int                      a_checks [N_ORGS];
  int                      a_fail   [N_ORGS];
  int                      a_stalls [N_ORGS];
  logic [N_ORGS-1:0]       a_done;
  int                      checks, failures;

  lowlat_fifos dut (
    .clr(clr), .rin(rin), .ain(ain), .din(din), .rout(rout), .aout(aout), .dout(dout)
  );

  // latency probes: one word into every empty FIFO before the agents start
  logic [N_ORGS-1:0]       p_rin, p_aout;
  logic [N_ORGS-1:0]       g_rin, g_aout;
  logic                    probing;
  assign rin  = probing ? p_rin  : g_rin;
  assign aout = probing ? p_aout : g_aout;

  logic [N_ORGS-1:0][7:0] g_din;
  logic [7:0]             p_din;
  always_comb begin
    for (int k = 0; k < N_ORGS; k++) din[k] = probing ? p_din : g_din[k];
  end

  for (genvar k = 0; k < N_ORGS; k++) begin : g_agent
    chan_agent #(.W(8), .CAPACITY(16), .NWORDS(NW), .NAME($sformatf("org%0d", k))) u_agent (
      .start(start), .rin(g_rin[k]), .ain(ain[k]), .din(g_din[k]),
      .rout(rout[k]), .aout(g_aout[k]), .dout(dout[k]),
      .checks(a_checks[k]), .failures(a_fail[k]), .stalls(a_stalls[k]), .done(a_done[k])
    );
  end

  // mechanism monitors
  int par_arm [4];
  int tree_branch [2];
  int sq_drop [4];
  int sq_routv;
  int fold_jump0, fold_jump_deep, fold_uturn;

  int  lat [N_ORGS];
  time t0;
  for (genvar k = 0; k < N_ORGS; k++) begin : g_lat
    always @(posedge rout[k]) if (probing && lat[k] < 0) lat[k] = int'($time - t0);
  end

  for (genvar k = 0; k < 4; k++) begin : g_mon4
    always @(dut.u_parallel.arm_rin[k]) if (!clr) par_arm[k]++;
    always @(dut.u_square.c_rin[k])     if (!clr) sq_drop[k]++;
  end
  always @(dut.u_tree.dc_r[2]) if (!clr) tree_branch[0]++;
  always @(dut.u_tree.dc_r[3]) if (!clr) tree_branch[1]++;
  always @(dut.u_square.b_rv[2] or dut.u_square.b_rv[3]) if (!clr) sq_routv++;
  always @(dut.u_folded.j_r[0]) if (!clr) fold_jump0++;
  always @(dut.u_folded.j_r[7:1]) if (!clr) fold_jump_deep++;
  always @(dut.u_folded.t_r[8]) if (!clr) fold_uturn++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    #400000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int want [N_ORGS];
    want = '{16, 7, 11, 11, 2};
    checks = 0; failures = 0;
    for (int k = 0; k < 4; k++) begin par_arm[k] = 0; sq_drop[k] = 0; end
    tree_branch = '{0, 0};
    sq_routv = 0; fold_jump0 = 0; fold_jump_deep = 0; fold_uturn = 0;
    clr = 1; start = 0; probing = 1; p_rin = '0; p_aout = '0; p_din = 8'h3C;
    #5 clr = 0;
    #5;
    for (int k = 0; k < N_ORGS; k++) lat[k] = -1;
    t0 = $time;
    p_rin = '1;
    #50;
    for (int k = 0; k < N_ORGS; k++) begin
      check(lat[k] == want[k], $sformatf("org %0d empty latency %0d, expected %0d", k, lat[k], want[k]));
      check(dout[k] == 8'h3C, $sformatf("org %0d probe word %0h", k, dout[k]));
    end
    p_aout = '1;
    #50;
    // hand the channels to the agents with matching two-phase levels
    clr = 1;
    #5;
    probing = 0;
    #5 clr = 0;
    #5 start = 1;
    wait (&a_done);
    for (int k = 0; k < N_ORGS; k++) begin
      checks += a_checks[k];
      failures += a_fail[k];
      check(a_stalls[k] > 0, $sformatf("org %0d never stalled on a full FIFO", k));
    end
    for (int k = 0; k < 4; k++) begin
      check(par_arm[k] > 0, $sformatf("parallel arm %0d never used", k));
      check(sq_drop[k] > 0, $sformatf("square column %0d never used", k));
    end
    check(tree_branch[0] > 0 && tree_branch[1] > 0, "tree root did not use both branches");
    check(sq_routv > 0, "square bottom row never switched to a column (ROUTV)");
    check(fold_jump0 > 0, "folded FIFO: no jump into the output cell");
    check(fold_jump_deep > 0, "folded FIFO: no jump deeper in the FIFO");
    check(fold_uturn > 0, "folded FIFO: no word went round the U-turn");
    $display("stalls: %0d %0d %0d %0d %0d", a_stalls[0], a_stalls[1], a_stalls[2], a_stalls[3], a_stalls[4]);
    $display("parallel arms %0d %0d %0d %0d; tree branches %0d %0d", par_arm[0], par_arm[1], par_arm[2], par_arm[3], tree_branch[0], tree_branch[1]);
    $display("square drops %0d %0d %0d %0d, ROUTV %0d", sq_drop[0], sq_drop[1], sq_drop[2], sq_drop[3], sq_routv);
    $display("folded jumps: cell0 %0d, deeper %0d, U-turn %0d", fold_jump0, fold_jump_deep, fold_uturn);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
