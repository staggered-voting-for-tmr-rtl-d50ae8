// majority_voter: two-out-of-three majority voter.
//
// The output is high when at least two of the three inputs are high. It is
// built as three pairwise terms, one for each pair of inputs, combined into
// one output, which is the two-level structure of the usual 18-transistor
// static voter. Purely combinational: no clock, no latency. The function and
// its two-level structure are those of the standard TMR voter; the stuck-at
// override on the output is this design's addition for defect emulation.
//
// Interface:
//   in      the three copies of the signal, one per redundant chain
//   defect  stuck-at defect of the voter output (NO_DEFECT in use)
//   y       majority of in[2:0]
module majority_voter
  import svtmr_pkg::*;
(
  input  logic [NMR-1:0] in,
  input  defect_t        defect,
  output logic           y
);

  logic pair01, pair12, pair02;

  always_comb begin
    pair01 = in[0] & in[1];
    pair12 = in[1] & in[2];
    pair02 = in[0] & in[2];
  end

  assign y = apply_defect(pair01 | pair12 | pair02, defect);

endmodule
