// staggered_tmr_chain: TMR shift-register chain with staggered voting.
//
// The chain moves a pulse one stage per clock, like a plain S/R chain, but
// every stage holds three S/R cells (one per redundant copy, "chain" 0..2)
// and one 2-of-3 majority voter:
//
//   * the voter of stage s votes over the three S/R outputs of stage s and
//     drives stage_out[s];
//   * the voter output feeds only ONE S/R of stage s+1, the one on chain
//     voter_chain(s) = s mod 3; the other two S/Rs of stage s+1 take the
//     output of the S/R above them on their own chain;
//   * so the voter position rotates 0, 1, 2, 0, ... from stage to stage.
//
// A defective voter then spoils only one chain, and that chain is restored
// three stages later when the voter comes back to it; a defective S/R is
// outvoted at once by its own stage's voter and its chain is restored by
// the next voter placed on that chain. The hardware is the same as a TMR
// chain with a single voter per stage.
//
// The three S/Rs of stage 0 all take the external start pulse sp_in. This
// and the choice of the voter output as the stage's output tap are this
// design's choices.
//
// Interface:
//   clk, rst_n    shift clock, asynchronous active-low reset
//   sp_in         start pulse from the external controller
//   sr_defect     per stage and chain, stuck-at defect of that S/R cell
//   voter_defect  per stage, stuck-at defect of that stage's voter
//   stage_out     voted output of every stage (gate line / latch enable)
//   sr_q          raw S/R cell outputs, for observation
//
// Timing: stage_out[s] at cycle t equals sp_in at cycle t-(s+1) in a chain
// whose defects are all masked.
module staggered_tmr_chain
  import svtmr_pkg::*;
#(
  parameter int unsigned STAGES = 768
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             sp_in,
  input  defect_t [STAGES-1:0][NMR-1:0]    sr_defect,
  input  defect_t [STAGES-1:0]             voter_defect,
  output logic    [STAGES-1:0]             stage_out,
  output logic    [STAGES-1:0][NMR-1:0]    sr_q
);

  logic [STAGES-1:0][NMR-1:0] sr_d;

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    for (genvar c = 0; c < NMR; c++) begin : g_chain
      if (s == 0) begin : g_first
        assign sr_d[s][c] = sp_in;
      end else if (c == voter_chain(s - 1)) begin : g_voted
        // the previous stage's voter sits on this chain
        assign sr_d[s][c] = stage_out[s-1];
      end else begin : g_through
        assign sr_d[s][c] = sr_q[s-1][c];
      end

      sr_cell u_sr (
        .clk    (clk),
        .rst_n  (rst_n),
        .d      (sr_d[s][c]),
        .defect (sr_defect[s][c]),
        .q      (sr_q[s][c])
      );
    end

    majority_voter u_voter (
      .in     (sr_q[s]),
      .defect (voter_defect[s]),
      .y      (stage_out[s])
    );
  end

endmodule
