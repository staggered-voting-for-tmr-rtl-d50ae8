// sr_cell: one static shift-register (S/R) stage of a TFT-LCD driver chain.
//
// The cell samples its input on the rising clock edge and shows it at q for
// the following cycle, so a one-cycle pulse entering a chain of these cells
// moves one stage further at every clock. That one-cycle-per-stage
// behaviour is what the chain has to deliver; the cell is written here as a
// plain D flip-flop, which is the simplest thing that does it.
//
// Interface:
//   clk, rst_n  clock, asynchronous active-low reset (clears the cell)
//   d           pulse from the previous stage (or the external start pulse)
//   defect      stuck-at defect of this cell's output (NO_DEFECT in use)
//   q           cell output, d delayed by one clock cycle
//
// The reset is this design's choice: it lets the chain start empty.
module sr_cell
  import svtmr_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    d,
  input  defect_t defect,
  output logic    q
);

  logic state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= 1'b0;
    else        state <= d;
  end

  assign q = apply_defect(state, defect);

endmodule
