// tb_table1_cases: the six defect cases of one stage of a staggered-voting
// chain, on a chain of default length (768 stages).
//
// Stage I = 300 carries its voter on chain 0 (300 mod 3 = 0). The cases:
//   0  no defect                       nothing spoilt
//   1  voter of stage I                chain 0 spoilt in stages I+1..I+3
//   2  S/R of stage I, chain 0         chain 0 spoilt in stage I only
//   3  S/R of stage I, chain 1         chain 1 spoilt in stages I..I+1
//   4  S/R of stage I, chain 2         chain 2 spoilt in stages I..I+2
//   5  voter and S/R of chain 0        chain 0 spoilt in stages I..I+3
// Each is run stuck at 0 and stuck at 1 with random start-pulse traffic
// through all stages. Checked against an ideal delay line in every cycle:
// all voted outputs (the tap of a dead voter must show its stuck level),
// and all raw S/R outputs outside the spoilt stretch of the case. Every
// case must also show a wrong value inside its stretch at least once, so
// the defect was really active, and the stretch must end where stated.
module tb_table1_cases;
  import svtmr_pkg::*;

  localparam int unsigned STAGES = 768;  // default of staggered_tmr_chain
  localparam int unsigned I = 300;

  // per case: spoilt stretch (first and last stage) and the chain it is on
  localparam int FIRST_BAD [6] = '{-1, I + 1, I, I, I, I};
  localparam int LAST_BAD  [6] = '{-1, I + 3, I, I + 1, I + 2, I + 3};
  localparam int BAD_CHAIN [6] = '{0, 0, 0, 1, 2, 0};

  logic                          clk = 1'b0;
  logic                          rst_n = 1'b1;
  logic                          sp_in = 1'b0;
  defect_t [STAGES-1:0][NMR-1:0] sr_defect;
  defect_t [STAGES-1:0]          voter_defect;
  logic    [STAGES-1:0]          stage_out;
  logic    [STAGES-1:0][NMR-1:0] sr_q;

  staggered_tmr_chain dut (
    .clk, .rst_n, .sp_in, .sr_defect, .voter_defect, .stage_out, .sr_q
  );

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [STAGES-1:0] golden;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) golden <= '0;
    else        golden <= {golden[STAGES-2:0], sp_in};
  end

  task automatic fail(input string msg);
    failures++;
    if (failures <= 20) $display("FAIL %s at %0t", msg, $time);
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int cs = 0; cs < 6; cs++) begin
      int active;
      int deepest;
      active = 0;
      deepest = -1;
      for (int v = 0; v < 2; v++) begin
        for (int s = 0; s < STAGES; s++) begin
          voter_defect[s] = NO_DEFECT;
          for (int c = 0; c < NMR; c++) sr_defect[s][c] = NO_DEFECT;
        end
        case (cs)
          1: voter_defect[I] = '{stuck: 1'b1, value: 1'(v)};
          2: sr_defect[I][0] = '{stuck: 1'b1, value: 1'(v)};
          3: sr_defect[I][1] = '{stuck: 1'b1, value: 1'(v)};
          4: sr_defect[I][2] = '{stuck: 1'b1, value: 1'(v)};
          5: begin
            voter_defect[I] = '{stuck: 1'b1, value: 1'(v)};
            sr_defect[I][0] = '{stuck: 1'b1, value: 1'(v == 0)};
          end
          default: ;
        endcase
        rst_n = 1'b0;
        @(negedge clk);
        rst_n = 1'b1;
        for (int t = 0; t < STAGES + 8; t++) begin
          logic [STAGES-1:0] exp_out;
          logic              raw_bad;
          sp_in = (t < STAGES / 2) ? (($urandom % 4) == 0) : 1'b0;
          @(negedge clk);
          exp_out = golden;
          if (voter_defect[I].stuck) exp_out[I] = voter_defect[I].value;
          checks++;
          if (stage_out !== exp_out) fail($sformatf("case %0d stuck %0d: voted outputs differ", cs, v));
          raw_bad = 1'b0;
          for (int s = 0; s < STAGES; s++)
            for (int c = 0; c < NMR; c++)
              if (sr_q[s][c] !== golden[s]) begin
                if (c == BAD_CHAIN[cs] && s >= FIRST_BAD[cs] && s <= LAST_BAD[cs]) begin
                  active++;
                  if (s > deepest) deepest = s;
                end else begin
                  raw_bad = 1'b1;
                end
              end
          checks++;
          if (raw_bad) fail($sformatf("case %0d stuck %0d: S/R outside the spoilt stretch differs", cs, v));
        end
      end
      sp_in = 1'b0;
      $display("case %0d: %0d wrong S/R values inside the stretch, deepest stage %0d", cs, active, deepest);
      checks++;
      if (cs == 0 && active != 0) fail("defect-free chain shows wrong values");
      if (cs != 0 && active == 0) fail($sformatf("case %0d: defect never active", cs));
      checks++;
      if (cs != 0 && deepest != LAST_BAD[cs])
        fail($sformatf("case %0d: spoilt stretch ends at %0d, expected %0d", cs, deepest, LAST_BAD[cs]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
