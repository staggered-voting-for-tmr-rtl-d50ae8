// tb_staggered_tmr_chain: self-checking test of the staggered-voting TMR
// chain, run on a short chain (STAGES = 24).
//
// Reference: a plain delay line, golden[s] = start pulse sampled s+1 clock
// cycles ago, which is what an ideal non-redundant S/R chain would show.
// With defects injected, the voted outputs must still equal the delay line
// (except the tap of a defective voter itself, which must show the stuck
// level), and every raw S/R output must equal it outside the region where
// the defect is allowed to spread:
//   * S/R defect at stage s, chain c: chain c may be wrong from stage s to
//     the first stage s' >= s whose voter sits on chain c (s' mod 3 == c);
//   * voter defect at stage s: chain (s mod 3) may be wrong in stages s+1
//     to s+3, and is restored by the voter of stage s+3.
// Tests: defect-free random traffic; the pulse latency (one stage per
// clock); every single S/R and voter defect, stuck at 0 and at 1; the
// double defect voter + S/R of the voter's own chain; random sets of
// defects spaced six stages apart; and one unmaskable double S/R defect,
// whose voted tap must follow the two faulty copies. Each kind of event is
// counted and must have happened at least once.
module tb_staggered_tmr_chain;
  import svtmr_pkg::*;

  localparam int unsigned STAGES = 24;

  logic                          clk = 1'b0;
  logic                          rst_n = 1'b1;
  logic                          sp_in = 1'b0;
  defect_t [STAGES-1:0][NMR-1:0] sr_defect;
  defect_t [STAGES-1:0]          voter_defect;
  logic    [STAGES-1:0]          stage_out;
  logic    [STAGES-1:0][NMR-1:0] sr_q;

  staggered_tmr_chain #(.STAGES(STAGES)) dut (
    .clk, .rst_n, .sp_in, .sr_defect, .voter_defect, .stage_out, .sr_q
  );

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  // event counters: defect effects that were visible and then masked
  int n_sr_deviation    = 0;  // a defective S/R chain carried a wrong value
  int n_voter_tap_wrong = 0;  // a defective voter showed a wrong tap value
  int n_resync          = 0;  // a spoilt chain was restored by a voter
  int n_double_masked   = 0;  // voter + own-chain S/R defect run masked
  int n_unmaskable      = 0;  // two faulty copies outvoted the good one

  // ideal plain S/R chain
  logic [STAGES-1:0] golden;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) golden <= '0;
    else        golden <= {golden[STAGES-2:0], sp_in};
  end

  // where raw S/R outputs may differ from the delay line
  logic [STAGES-1:0][NMR-1:0] may_differ;
  // stage right after a spoilt region, per chain (-1: none)
  int resync_stage [NMR];

  function automatic int first_voter_on(input int s, input int c);
    int k = s;
    while (k % NMR != c) k++;
    return k;
  endfunction

  task automatic clear_defects();
    for (int s = 0; s < STAGES; s++) begin
      voter_defect[s] = NO_DEFECT;
      for (int c = 0; c < NMR; c++) sr_defect[s][c] = NO_DEFECT;
    end
  endtask

  task automatic compute_mask();
    may_differ = '0;
    for (int c = 0; c < NMR; c++) resync_stage[c] = -1;
    for (int s = 0; s < STAGES; s++) begin
      for (int c = 0; c < NMR; c++) begin
        if (sr_defect[s][c].stuck) begin
          int last = first_voter_on(s, c);
          for (int j = s; j <= last && j < STAGES; j++) may_differ[j][c] = 1'b1;
          if (last + 1 < STAGES) resync_stage[c] = last + 1;
        end
      end
      if (voter_defect[s].stuck) begin
        int p = s % NMR;
        for (int j = s + 1; j <= s + 3 && j < STAGES; j++) may_differ[j][p] = 1'b1;
        if (s + 4 < STAGES) resync_stage[p] = s + 4;
      end
    end
  endtask

  task automatic fail(input string msg);
    failures++;
    if (failures <= 20) $display("FAIL %s at %0t", msg, $time);
  endtask

  // compare the chain with the reference, after a rising edge has settled
  task automatic check_cycle(input string tag);
    logic [STAGES-1:0] exp_out;
    logic              raw_bad;
    exp_out = golden;
    for (int s = 0; s < STAGES; s++) begin
      if (voter_defect[s].stuck) begin
        exp_out[s] = voter_defect[s].value;
        if (voter_defect[s].value != golden[s]) n_voter_tap_wrong++;
      end
    end
    checks++;
    if (stage_out !== exp_out)
      fail($sformatf("%s: stage_out=%h expected %h", tag, stage_out, exp_out));
    raw_bad = 1'b0;
    for (int s = 0; s < STAGES; s++) begin
      for (int c = 0; c < NMR; c++) begin
        if (may_differ[s][c]) begin
          if (sr_q[s][c] !== golden[s]) n_sr_deviation++;
        end else if (sr_q[s][c] !== golden[s]) begin
          raw_bad = 1'b1;
        end
      end
    end
    checks++;
    if (raw_bad) fail($sformatf("%s: S/R outputs outside the allowed region differ", tag));
  endtask

  // reset, then run random start pulses through the whole chain
  task automatic run_traffic(input int cycles, input string tag);
    bit resync_seen [NMR];
    bit spoilt_seen [NMR];
    compute_mask();
    for (int c = 0; c < NMR; c++) begin
      resync_seen[c] = 1'b0;
      spoilt_seen[c] = 1'b0;
    end
    rst_n = 1'b0;
    sp_in = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < cycles; t++) begin
      sp_in = (t < cycles - STAGES) ? (($urandom % 3) == 0) : 1'b0;
      @(negedge clk);
      check_cycle(tag);
      for (int c = 0; c < NMR; c++) begin
        if (resync_stage[c] >= 0) begin
          // the chain was spoilt somewhere above and is right again here
          for (int j = 0; j < resync_stage[c]; j++)
            if (may_differ[j][c] && sr_q[j][c] !== golden[j]) spoilt_seen[c] = 1'b1;
          if (spoilt_seen[c] && sr_q[resync_stage[c]][c] === golden[resync_stage[c]] &&
              golden[resync_stage[c]])
            resync_seen[c] = 1'b1;
        end
      end
    end
    for (int c = 0; c < NMR; c++) if (resync_seen[c]) n_resync++;
    sp_in = 1'b0;
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int latency;
    clear_defects();

    // 1. defect-free traffic
    run_traffic(4 * STAGES, "no defect");

    // 2. latency: a single pulse reaches the last stage STAGES cycles later
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    sp_in = 1'b1;
    @(negedge clk);
    sp_in = 1'b0;
    latency = 1;
    while (!stage_out[STAGES-1] && latency < 4 * STAGES) begin
      @(negedge clk);
      latency++;
    end
    checks++;
    if (latency != STAGES) fail($sformatf("latency %0d cycles, expected %0d", latency, STAGES));
    checks++;
    if ($countones(stage_out) != 1) fail("more than one stage active for one pulse");

    // 3. every single defect
    for (int s = 0; s < STAGES; s++) begin
      for (int v = 0; v < 2; v++) begin
        for (int c = 0; c < NMR; c++) begin
          clear_defects();
          sr_defect[s][c] = '{stuck: 1'b1, value: 1'(v)};
          run_traffic(STAGES + 16, $sformatf("S/R defect s=%0d c=%0d v=%0d", s, c, v));
        end
        clear_defects();
        voter_defect[s] = '{stuck: 1'b1, value: 1'(v)};
        run_traffic(STAGES + 16, $sformatf("voter defect s=%0d v=%0d", s, v));
      end
    end

    // 4. voter and the S/R of its own chain both defective
    for (int s = 0; s < STAGES; s++) begin
      int fails_before;
      fails_before = failures;
      clear_defects();
      voter_defect[s] = '{stuck: 1'b1, value: 1'($urandom)};
      sr_defect[s][s % NMR] = '{stuck: 1'b1, value: 1'($urandom)};
      run_traffic(STAGES + 16, $sformatf("double defect s=%0d", s));
      if (failures == fails_before) n_double_masked++;
    end

    // 5. random sets of single defects spaced six stages apart
    for (int trial = 0; trial < 60; trial++) begin
      clear_defects();
      for (int s = int'($urandom % 6); s < STAGES; s += 6) begin
        if ($urandom % 4 == 0) voter_defect[s] = '{stuck: 1'b1, value: 1'($urandom)};
        else sr_defect[s][$urandom % NMR] = '{stuck: 1'b1, value: 1'($urandom)};
      end
      run_traffic(STAGES + 24, $sformatf("spaced defects trial %0d", trial));
    end

    // 6. two copies of one stage stuck high: the voted tap follows them
    clear_defects();
    sr_defect[10][0] = '{stuck: 1'b1, value: 1'b1};
    sr_defect[10][2] = '{stuck: 1'b1, value: 1'b1};
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 8; t++) begin
      @(negedge clk);
      checks++;
      if (stage_out[10] !== 1'b1) fail("two stuck copies not reflected at the voted tap");
      else if (golden[10] == 1'b0) n_unmaskable++;
    end
    clear_defects();

    $display("events: sr_deviation=%0d voter_tap_wrong=%0d resync=%0d double_masked=%0d unmaskable=%0d",
             n_sr_deviation, n_voter_tap_wrong, n_resync, n_double_masked, n_unmaskable);
    checks++;
    if (n_sr_deviation == 0)    fail("no S/R defect ever spoilt its chain");
    checks++;
    if (n_voter_tap_wrong == 0) fail("no voter defect ever showed at its tap");
    checks++;
    if (n_resync == 0)          fail("no spoilt chain was seen restored");
    checks++;
    if (n_double_masked == 0)   fail("no double defect was masked");
    checks++;
    if (n_unmaskable == 0)      fail("unmaskable case never observed");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
