// settoff_bit -- one SETTOFF bit: main flip-flop, transition detector and
// correction XOR (Part II of the cell).
//
// The main flip-flop stores N = ~d at each rising edge of clk. The correction
// XOR drives q = ~N while the transition detector's error_seu_bar is 1. If a
// particle flips N while clk is low, the detector pulls error_seu_bar to 0
// after its detection delay and the XOR then passes N itself, so q returns to
// the written value after a short correction glitch. The next rising edge
// restores error_seu_bar to 1 and, when a value is written (directly, or fed
// back from q by a hold multiplexer), N is correct again.
//
// Upsets while clk is high are not corrected here; they show as a mismatch
// between d and q and are caught by the shared detection stage (settoff_trd).
//
// clk is the clock the bit actually sees: in a clock-gated register it is the
// gated clock, for both the flip-flop and the detector, as the cell requires.
// seu_strike is a simulation-only fault-injection input of the main flip-flop
// model.
`timescale 1ps/1ps
module settoff_bit #(
  parameter int unsigned TD_CHAIN_PS  = settoff_pkg::TD_CHAIN_DEFAULT_PS,
  parameter int unsigned TD_DETECT_PS = settoff_pkg::TD_DETECT_DEFAULT_PS,
  parameter int unsigned TD_CLK_PS    = settoff_pkg::TD_CLK_DEFAULT_PS
) (
  input  logic clk,
  input  logic d,
  input  logic seu_strike,     // simulation only: flips node N
  output logic q,
  output logic n,              // storage node N, brought out for observation
  output logic error_seu_bar   // 0 while an upset of N is being corrected
);

  settoff_main_ff u_main_ff (
    .clk        (clk),
    .d          (d),
    .seu_strike (seu_strike),
    .n          (n)
  );

  settoff_td #(
    .CHAIN_PS  (TD_CHAIN_PS),
    .DETECT_PS (TD_DETECT_PS),
    .CLK_PS    (TD_CLK_PS)
  ) u_td (
    .clk           (clk),
    .n             (n),
    .error_seu_bar (error_seu_bar)
  );

  settoff_corr_xor u_corr_xor (
    .n             (n),
    .error_seu_bar (error_seu_bar),
    .q             (q)
  );

endmodule
