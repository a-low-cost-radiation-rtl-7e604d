// settoff_corr_xor -- correction XOR gate of a SETTOFF bit.
//
// It replaces the output inverter of a conventional flip-flop. With
// error_seu_bar at 1 (normal operation) it inverts storage node N onto Q,
// exactly as the removed inverter did, and its transmission gate is off, so
// the normal clock-to-Q path has no extra gate. With error_seu_bar at 0 (the
// transition detector has seen an upset of N) it passes N straight to Q, which
// undoes the flip at the output: Q = N xor error_seu_bar.
//
// Purely combinational. The transistor-level gate (an inverter plus a
// transmission gate) is written here as one XOR.
`timescale 1ps/1ps
module settoff_corr_xor (
  input  logic n,              // storage node N
  input  logic error_seu_bar,  // from the transition detector
  output logic q               // flip-flop output
);

  assign q = n ^ error_seu_bar;

endmodule
