// tb_tft_sr_chains: end-to-end test of the driver top at full XGA size
// (768 gate lines, 1024 data columns), one complete frame.
//
// The frame: one gate start pulse walks down all 768 gate lines, one line
// per gate clock; during every line a data start pulse walks across all
// 1024 latch enables, one per data clock. Both chains carry defects that
// staggered voting must mask: an S/R stuck high, a voter stuck, a voter
// together with the S/R of its own chain, and an S/R stuck low.
//
// Reference: two plain delay lines fed with the same start pulses. Every
// gate_line / latch_en value is compared with them in every cycle (the tap
// of a defective voter must show its stuck level instead); raw S/R outputs
// are compared outside the stages a defect may spoil, at every gate clock
// and at every data clock of the first two lines (every 61st later).
// Counted events, each of which must happen: gate pulse on every line,
// latch-enable pulse on every column, an S/R defect carrying a wrong value,
// a voter defect showing at its tap, a spoilt chain restored by a later
// voter, and a double defect masked.
module tb_tft_sr_chains;
  import svtmr_pkg::*;

  localparam int unsigned G = 768;   // default GATE_STAGES of the top
  localparam int unsigned D = 1024;  // default DATA_STAGES of the top
  localparam int unsigned LINE_DATA_CYCLES = D + 8;

  logic rst_n = 1'b1;
  logic gate_clk = 1'b0;
  logic gate_sp = 1'b0;
  logic data_clk = 1'b0;
  logic data_sp = 1'b0;
  defect_t [G-1:0][NMR-1:0] gate_sr_defect;
  defect_t [G-1:0]          gate_voter_defect;
  defect_t [D-1:0][NMR-1:0] data_sr_defect;
  defect_t [D-1:0]          data_voter_defect;
  logic    [G-1:0]          gate_line;
  logic    [G-1:0][NMR-1:0] gate_sr_q;
  logic    [D-1:0]          latch_en;
  logic    [D-1:0][NMR-1:0] data_sr_q;

  tft_sr_chains dut (
    .rst_n, .gate_clk, .gate_sp, .gate_sr_defect, .gate_voter_defect,
    .gate_line, .gate_sr_q, .data_clk, .data_sp, .data_sr_defect,
    .data_voter_defect, .latch_en, .data_sr_q
  );

  int checks = 0;
  int failures = 0;

  int n_gate_lines_hit = 0;
  int n_latch_en_hit   = 0;
  int n_sr_deviation   = 0;
  int n_voter_tap      = 0;
  int n_resync         = 0;
  int n_double_masked  = 0;

  logic [G-1:0] gate_hit = '0;
  logic [D-1:0] data_hit = '0;

  // ideal plain chains
  logic [G-1:0] gate_golden;
  logic [D-1:0] data_golden;
  always_ff @(posedge gate_clk or negedge rst_n) begin
    if (!rst_n) gate_golden <= '0;
    else        gate_golden <= {gate_golden[G-2:0], gate_sp};
  end
  always_ff @(posedge data_clk or negedge rst_n) begin
    if (!rst_n) data_golden <= '0;
    else        data_golden <= {data_golden[D-2:0], data_sp};
  end

  logic [G-1:0][NMR-1:0] gate_may_differ;
  logic [D-1:0][NMR-1:0] data_may_differ;
  logic [G-1:0]          gate_tap_mask, gate_tap_val;
  logic [D-1:0]          data_tap_mask, data_tap_val;

  task automatic fail(input string msg);
    failures++;
    if (failures <= 20) $display("FAIL %s at %0t", msg, $time);
  endtask

  function automatic int first_voter_on(input int s, input int c);
    int k = s;
    while (k % NMR != c) k++;
    return k;
  endfunction

  // defects of the frame (spaced far apart, each maskable on its own)
  task automatic place_defects();
    for (int s = 0; s < G; s++) begin
      gate_voter_defect[s] = NO_DEFECT;
      for (int c = 0; c < NMR; c++) gate_sr_defect[s][c] = NO_DEFECT;
    end
    for (int s = 0; s < D; s++) begin
      data_voter_defect[s] = NO_DEFECT;
      for (int c = 0; c < NMR; c++) data_sr_defect[s][c] = NO_DEFECT;
    end
    gate_sr_defect[100][2]  = '{stuck: 1'b1, value: 1'b1};
    gate_voter_defect[300]  = '{stuck: 1'b1, value: 1'b0};
    gate_voter_defect[500]  = '{stuck: 1'b1, value: 1'b0};
    gate_sr_defect[500][500 % NMR] = '{stuck: 1'b1, value: 1'b1};
    gate_sr_defect[700][0]  = '{stuck: 1'b1, value: 1'b0};
    data_sr_defect[5][1]    = '{stuck: 1'b1, value: 1'b1};
    data_voter_defect[400]  = '{stuck: 1'b1, value: 1'b1};
    data_voter_defect[800]  = '{stuck: 1'b1, value: 1'b0};
    data_sr_defect[800][800 % NMR] = '{stuck: 1'b1, value: 1'b0};
    data_sr_defect[1000][0] = '{stuck: 1'b1, value: 1'b0};
  endtask

  // stages a defect may spoil, from the staggered topology: an S/R defect
  // spoils its chain down to the next voter on that chain, a voter defect
  // spoils its own chain for the three stages after it
  task automatic compute_masks();
    gate_may_differ = '0;
    data_may_differ = '0;
    gate_tap_mask = '0;
    gate_tap_val  = '0;
    data_tap_mask = '0;
    data_tap_val  = '0;
    for (int s = 0; s < G; s++) begin
      for (int c = 0; c < NMR; c++)
        if (gate_sr_defect[s][c].stuck)
          for (int j = s; j <= first_voter_on(s, c) && j < G; j++) gate_may_differ[j][c] = 1'b1;
      if (gate_voter_defect[s].stuck) begin
        for (int j = s + 1; j <= s + 3 && j < G; j++) gate_may_differ[j][s % NMR] = 1'b1;
        gate_tap_mask[s] = 1'b1;
        gate_tap_val[s]  = gate_voter_defect[s].value;
      end
    end
    for (int s = 0; s < D; s++) begin
      for (int c = 0; c < NMR; c++)
        if (data_sr_defect[s][c].stuck)
          for (int j = s; j <= first_voter_on(s, c) && j < D; j++) data_may_differ[j][c] = 1'b1;
      if (data_voter_defect[s].stuck) begin
        for (int j = s + 1; j <= s + 3 && j < D; j++) data_may_differ[j][s % NMR] = 1'b1;
        data_tap_mask[s] = 1'b1;
        data_tap_val[s]  = data_voter_defect[s].value;
      end
    end
  endtask

  task automatic check_gate(input bit raw);
    logic [G-1:0] exp_line;
    exp_line = (gate_golden & ~gate_tap_mask) | (gate_tap_val & gate_tap_mask);
    checks++;
    if (gate_line !== exp_line) fail("gate_line differs from the plain chain");
    if ((gate_golden & gate_tap_mask) != (gate_tap_val & gate_tap_mask) ||
        (~gate_golden & gate_tap_mask) != (~gate_tap_val & gate_tap_mask))
      n_voter_tap++;
    gate_hit |= gate_line & ~gate_tap_mask;
    if (raw) begin
      logic bad = 1'b0;
      for (int s = 0; s < G; s++)
        for (int c = 0; c < NMR; c++)
          if (gate_sr_q[s][c] !== gate_golden[s]) begin
            if (gate_may_differ[s][c]) n_sr_deviation++;
            else bad = 1'b1;
          end
      checks++;
      if (bad) fail("gate S/R output differs outside the spoilt stages");
      // voter-defect chains restored: stage s+4 of the voter's chain
      // carries the pulse after stage s+1 missed it
      if (gate_golden[304] && gate_sr_q[304][300 % NMR] && !gate_sr_q[301][300 % NMR]) n_resync++;
    end
  endtask

  task automatic check_data(input bit raw);
    logic [D-1:0] exp_en;
    exp_en = (data_golden & ~data_tap_mask) | (data_tap_val & data_tap_mask);
    checks++;
    if (latch_en !== exp_en) begin
      fail("latch_en differs from the plain chain");
      if (failures <= 3)
        for (int s = 0; s < D; s++)
          if (latch_en[s] !== exp_en[s]) $display("  column %0d: %b expected %b", s, latch_en[s], exp_en[s]);
    end
    if (((data_golden ^ data_tap_val) & data_tap_mask) != '0) n_voter_tap++;
    if (raw) begin
      logic bad = 1'b0;
      for (int s = 0; s < D; s++)
        for (int c = 0; c < NMR; c++)
          if (data_sr_q[s][c] !== data_golden[s]) begin
            if (data_may_differ[s][c]) n_sr_deviation++;
            else bad = 1'b1;
          end
      checks++;
      if (bad) fail("data S/R output differs outside the spoilt stages");
      if (data_golden[804] && data_sr_q[804][800 % NMR] && !data_sr_q[801][800 % NMR]) begin
        n_resync++;
        n_double_masked++;
      end
    end
    data_hit |= latch_en & ~data_tap_mask;
  endtask

  task automatic data_tick();
    #1 data_clk = 1'b1;
    #1 data_clk = 1'b0;
  endtask

  task automatic gate_tick();
    #1 gate_clk = 1'b1;
    #1 gate_clk = 1'b0;
  endtask

  initial begin : watchdog
    #40_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    place_defects();
    compute_masks();
    #1 rst_n = 1'b0;
    #1 rst_n = 1'b1;

    // the gate start pulse is sampled by the first gate clock of the frame
    gate_sp = 1'b1;
    for (int line = 0; line < G + 2; line++) begin
      gate_tick();
      gate_sp = 1'b0;
      check_gate(1'b1);
      if (line < G) begin
        // one data scan during this line
        data_sp = 1'b1;
        for (int t = 0; t < LINE_DATA_CYCLES; t++) begin
          data_tick();
          data_sp = 1'b0;
          check_data(line < 2 || (t % 61) == 0);
        end
      end
      if (line == 502 && gate_line[502] && !gate_sr_q[501][500 % NMR]) n_double_masked++;
    end

    n_gate_lines_hit = $countones(gate_hit);
    n_latch_en_hit   = $countones(data_hit);
    $display("events: gate_lines=%0d latch_en=%0d sr_deviation=%0d voter_tap=%0d resync=%0d double_masked=%0d",
             n_gate_lines_hit, n_latch_en_hit, n_sr_deviation, n_voter_tap, n_resync, n_double_masked);
    // every line and column pulsed, except the taps of the voters stuck low
    // (gate 300, 500, data 800); the data voter 400 is stuck high
    checks++;
    if (n_gate_lines_hit != G - 2) fail($sformatf("%0d gate lines pulsed", n_gate_lines_hit));
    checks++;
    if (n_latch_en_hit != D - 2) fail($sformatf("%0d latch enables pulsed", n_latch_en_hit));
    checks++;
    if (n_sr_deviation == 0) fail("no S/R defect carried a wrong value");
    checks++;
    if (n_voter_tap == 0) fail("no voter defect showed at its tap");
    checks++;
    if (n_resync == 0) fail("no spoilt chain restored");
    checks++;
    if (n_double_masked == 0) fail("no double defect masked");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
