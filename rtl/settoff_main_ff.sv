// settoff_main_ff -- behavioural model of the main flip-flop of a SETTOFF bit.
//
// The main flip-flop is a conventional edge-triggered flip-flop. Only its
// last state-holding inverter pair matters to SETTOFF: its node N holds the
// inverse of the captured data, and the output inverter that would normally
// turn N back into Q is replaced by the correction XOR (settoff_corr_xor).
// So this model captures N = ~d on each rising clock edge.
//
// A particle strike on the inverter pair (a single-event upset) is modelled by
// the simulation-only input seu_strike: each rising edge of it flips N at
// once. The model keeps the value captured at the clock edge and a strike
// parity: a toggle flop counts strikes, the clock edge records the count, and
// N is the captured value inverted once per strike since that edge. The
// strike input has no counterpart in silicon, which is why the file is a
// behavioural model rather than synthesizable logic.
//
// Timing: N changes at the rising clock edge with no clock-to-N delay. There
// is no reset; the first write defines N, as in a plain flip-flop.
`timescale 1ps/1ps
module settoff_main_ff (
  input  logic clk,         // rising edge captures
  input  logic d,           // data from logic stage L1 (or the hold mux)
  input  logic seu_strike,  // simulation only: rising edge flips N
  output logic n            // storage node N, equal to ~d after a write
);

  logic captured;      // ~d at the last rising clock edge
  logic strikes;       // parity of all strikes so far
  logic strikes_seen;  // strike parity at the last rising clock edge

  always_ff @(posedge clk) begin
    captured     <= ~d;
    strikes_seen <= strikes;
  end

  always_ff @(posedge seu_strike) begin
    strikes <= ~strikes;
  end

  assign n = captured ^ strikes ^ strikes_seen;

endmodule
