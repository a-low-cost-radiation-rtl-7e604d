// settoff_pkg -- types and default timing shared by the SETTOFF register.
//
// SETTOFF (Soft Error and Timing error Tolerant Flip-Flop) is a flip-flop
// that corrects upsets of its own storage node on the fly and flags, for an
// architectural replay, transient pulses and late data on its input. The
// package holds the choice of hold architecture and the default delays of
// the behavioural parts of the cell. Times are in picoseconds.
`timescale 1ps/1ps
package settoff_pkg;

  // How a register made of SETTOFF bits keeps its value in a cycle without a
  // write. Both styles are the ones the cell is described for: a multiplexer
  // that feeds Q back to D while the clock keeps running, or a gated clock.
  typedef enum logic {
    HOLD_MUX        = 1'b0,
    HOLD_CLOCK_GATE = 1'b1
  } hold_e;

  // Delay of the transition detector from a flip of the storage node to its
  // error output falling. It sets the width of the correction glitch at Q;
  // 98 ps is the mean glitch width reported for the 65 nm cell.
  localparam int unsigned TD_DETECT_DEFAULT_PS = 98;

  // Delay of each delay chain inside the transition detector (one inverter
  // and one transmission gate). Not given for the 65 nm cell; chosen here.
  localparam int unsigned TD_CHAIN_DEFAULT_PS = 40;

  // Delay of the clock inverter in front of the transition detector's
  // precharge and enable devices. Not given; chosen here.
  localparam int unsigned TD_CLK_DEFAULT_PS = 10;

endpackage
