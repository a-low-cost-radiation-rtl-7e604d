// settoff_td -- behavioural model of the SETTOFF transition detector (TD).
//
// The TD watches storage node N of the main flip-flop and reports any flip of
// N that happens while the clock is low, which can only be an upset because
// the flip-flop writes on the rising edge.
//
// How the circuit works, and how the model follows it:
//  * Two delay chains, each an inverter and a transmission gate, make a
//    delayed copy of N. For a short time after N rises, the chain taps that
//    serve rising transitions are both asserted; after N falls, the taps for
//    falling transitions are. The model lumps the detection delay at the
//    input: a rising transition of N asserts pulse_rise, a falling one
//    pulse_fall, DETECT_PS after the transition and for CHAIN_PS.
//  * A dynamic OR gate with node M: while clk is high M is precharged, and
//    the output error_seu_bar is 1 (the TD is disabled); while clk is low
//    either pulse pair discharges M. Cross-coupled inverters keep M against
//    leakage, so once discharged it stays 0 until the next rising clock edge.
//    Here M is a level-sensitive latch: set by clk, cleared by a pulse.
//  * error_seu_bar follows M. The delay from the flip of N to the fall of
//    error_seu_bar is DETECT_PS; during it Q still shows the upset value,
//    which is the correction glitch.
//
// Interface: clk must be the same (possibly gated) clock the main flip-flop
// gets. If that clock is gated low after an upset, error_seu_bar stays 0 and
// keeps the output corrected for as long as the gate is closed.
//
// The clock reaches the precharge and enable devices through an inverter;
// CLK_PS models its delay. It matters: in a multiplexer-based hold the flip-
// flop samples the corrected Q at the rising edge, and the detector must not
// release (and so flip Q back) before that sample is taken.
//
// DETECT_PS defaults to the mean correction glitch width measured for the
// 65 nm cell; CHAIN_PS and CLK_PS are this model's choices.
// The latch on M is intended: it is the keeper of the dynamic node.
`timescale 1ps/1ps
module settoff_td #(
  parameter int unsigned CHAIN_PS  = settoff_pkg::TD_CHAIN_DEFAULT_PS,
  parameter int unsigned DETECT_PS = settoff_pkg::TD_DETECT_DEFAULT_PS,
  parameter int unsigned CLK_PS    = settoff_pkg::TD_CLK_DEFAULT_PS
) (
  input  logic clk,            // high: disabled and precharged; low: enabled
  input  logic n,              // node N of the main flip-flop
  output logic error_seu_bar   // 0 = an upset of N was seen in this low phase
);

  logic pulse_rise;         // taps of the rising-transition chain asserted
  logic pulse_fall;         // taps of the falling-transition chain asserted
  logic discharge;          // pull-down network of node M conducting
  logic m;                  // dynamic node M with its keeper
  logic clk_td;             // clk after the detector's clock inverter

  // No pulse before the first transition of N.
  initial begin
    pulse_rise = 1'b0;
    pulse_fall = 1'b0;
  end

  // Each transition of N opens one pull-down branch of M for CHAIN_PS,
  // starting DETECT_PS after the transition. Transport delays: every
  // transition comes through, however short.
  always @(n) begin
    pulse_rise <= #(DETECT_PS) n;
    pulse_rise <= #(DETECT_PS + CHAIN_PS) 1'b0;
    pulse_fall <= #(DETECT_PS) ~n;
    pulse_fall <= #(DETECT_PS + CHAIN_PS) 1'b0;
  end

  assign discharge = pulse_rise | pulse_fall;

  always @(clk) clk_td <= #(CLK_PS) clk;

  always_latch begin
    if (clk_td)         m = 1'b1;
    else if (discharge) m = 1'b0;
  end

  assign error_seu_bar = m;

endmodule
