// tft_sr_chains: the two shift-register chains of an XGA digital poly-Si
// TFT-LCD driver, both built as staggered-voting TMR chains.
//
//   * Gate driver: GATE_STAGES (768) stages. A start pulse on gate_sp is
//     moved one gate line further per gate_clk cycle, so gate_line[n] is
//     high for one cycle, n+1 cycles after the start pulse was sampled.
//   * Data driver: DATA_STAGES (1024) stages. A start pulse on data_sp
//     walks across latch_en[], one latch enable per data_clk cycle, to
//     let the column latches read the image data in turn.
//
// The two chains run on their own clocks and share the reset. The level
// shifters, data latches, D/A converters and the pixel array that these
// pulses drive are outside this module: gate_line[] and latch_en[] are the
// ports they connect to. Each chain brings out its defect inputs (tie them
// to zero in a real panel) and its raw S/R cell outputs.
//
// The chain lengths follow an XGA panel (768 lines, 1024 columns); using a
// staggered chain for the data driver as well as the gate driver, and the
// separate clocks, are this design's choices.
module tft_sr_chains
  import svtmr_pkg::*;
#(
  parameter int unsigned GATE_STAGES = 768,
  parameter int unsigned DATA_STAGES = 1024
) (
  input  logic                               rst_n,
  // gate driver
  input  logic                               gate_clk,
  input  logic                               gate_sp,
  input  defect_t [GATE_STAGES-1:0][NMR-1:0] gate_sr_defect,
  input  defect_t [GATE_STAGES-1:0]          gate_voter_defect,
  output logic    [GATE_STAGES-1:0]          gate_line,
  output logic    [GATE_STAGES-1:0][NMR-1:0] gate_sr_q,
  // data driver
  input  logic                               data_clk,
  input  logic                               data_sp,
  input  defect_t [DATA_STAGES-1:0][NMR-1:0] data_sr_defect,
  input  defect_t [DATA_STAGES-1:0]          data_voter_defect,
  output logic    [DATA_STAGES-1:0]          latch_en,
  output logic    [DATA_STAGES-1:0][NMR-1:0] data_sr_q
);

  staggered_tmr_chain #(.STAGES(GATE_STAGES)) u_gate_chain (
    .clk          (gate_clk),
    .rst_n        (rst_n),
    .sp_in        (gate_sp),
    .sr_defect    (gate_sr_defect),
    .voter_defect (gate_voter_defect),
    .stage_out    (gate_line),
    .sr_q         (gate_sr_q)
  );

  staggered_tmr_chain #(.STAGES(DATA_STAGES)) u_data_chain (
    .clk          (data_clk),
    .rst_n        (rst_n),
    .sp_in        (data_sp),
    .sr_defect    (data_sr_defect),
    .voter_defect (data_voter_defect),
    .stage_out    (latch_en),
    .sr_q         (data_sr_q)
  );

endmodule
