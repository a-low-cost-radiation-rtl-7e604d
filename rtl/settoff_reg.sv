// settoff_reg -- a register of WIDTH SETTOFF flip-flops (top of the design).
//
// SETTOFF tolerates the three ways a particle or a slow path can corrupt a
// flip-flop, at about the cost of one extra flip-flop per bit:
//  * an upset (SEU) of a bit's storage node while clk is low is corrected at
//    the output on the fly, per bit, by that bit's transition detector and
//    correction XOR (settoff_bit); so several bits struck at once (a
//    multiple-bit upset) are all corrected;
//  * a transient pulse (SET) on d, a timing error on d, or an upset while
//    clk is high is detected by the shared time-redundancy stage
//    (settoff_trd), which raises error_set at the falling edge of the write
//    cycle so that the write can be replayed.
// The clock duty cycle splits the two duties: the high phase is the
// detection (TRD) interval, the low phase the correction (TD) interval.
//
// Hold cycles (we = 0) come in two styles, chosen by HOLD:
//  * HOLD_MUX: the bits keep being clocked and a multiplexer feeds q back to
//    their inputs. A bit corrected in the previous cycle then rewrites its
//    storage node with the corrected value.
//  * HOLD_CLOCK_GATE: a latch-based clock gate stops the bits' clock, for the
//    flip-flops and the transition detectors alike. A corrected bit keeps the
//    upset in its storage node but its detector output stays 0, so q stays
//    corrected until the next write.
// The detection XORs compare the bits' actual inputs (after the hold
// multiplexer) with q. The error flip-flop and its write-cycle flag run on
// the free-running clock.
//
// Timing: d and we are sampled at the rising edge of clk and must then stay
// stable for the whole high phase; launch the next value after the falling
// edge. q is valid right after the rising edge, except for a bit corrected in
// the low phase before it: its detector releases only TD_CLK_PS after the
// edge, and until then that bit of q shows the inverse of its new value.
// error_set refers to the write
// at the preceding rising edge and is valid from the falling edge to the next
// falling edge.
//
// The structure follows the SETTOFF cell. WIDTH = 1 is the single flip-flop;
// the register width, the reset of the detection stage and the default hold
// style are this design's choices. seu_strike is a fault-injection input for
// simulation: tie it to 0 in use. The transition detector and main flip-flop
// are behavioural models, so this module simulates the cell but is not a
// netlist for synthesis. The clock-gate latch is intended.
`timescale 1ps/1ps
module settoff_reg
  import settoff_pkg::*;
#(
  parameter int unsigned WIDTH        = 1,
  parameter hold_e       HOLD         = HOLD_MUX,
  parameter int unsigned TD_CHAIN_PS  = settoff_pkg::TD_CHAIN_DEFAULT_PS,
  parameter int unsigned TD_DETECT_PS = settoff_pkg::TD_DETECT_DEFAULT_PS,
  parameter int unsigned TD_CLK_PS    = settoff_pkg::TD_CLK_DEFAULT_PS
) (
  input  logic             clk,
  input  logic             rst_n,          // resets the detection stage only
  input  logic             we,             // 1: write d; 0: hold
  input  logic [WIDTH-1:0] d,
  input  logic [WIDTH-1:0] seu_strike,     // simulation only: flips node N
  output logic [WIDTH-1:0] q,
  output logic [WIDTH-1:0] error_seu_bar,  // per bit: 0 while correcting
  output logic             error_set       // replay request for last write
);

  logic [WIDTH-1:0] d_bit;     // what the bits capture
  logic             bit_clk;   // clock of the bits (gated or not)
  logic [WIDTH-1:0] n_unused;  // storage nodes, observed only in simulation

  if (HOLD == HOLD_MUX) begin : g_hold_mux
    assign d_bit   = we ? d : q;
    assign bit_clk = clk;
  end else begin : g_hold_clock_gate
    logic gate_en;  // we, latched while clk is low
    always_latch begin
      if (!clk) gate_en = we;
    end
    assign d_bit   = d;
    assign bit_clk = clk & gate_en;
  end

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    settoff_bit #(
      .TD_CHAIN_PS  (TD_CHAIN_PS),
      .TD_DETECT_PS (TD_DETECT_PS),
      .TD_CLK_PS    (TD_CLK_PS)
    ) u_bit (
      .clk           (bit_clk),
      .d             (d_bit[i]),
      .seu_strike    (seu_strike[i]),
      .q             (q[i]),
      .n             (n_unused[i]),
      .error_seu_bar (error_seu_bar[i])
    );
  end

  settoff_trd #(
    .WIDTH (WIDTH)
  ) u_trd (
    .clk       (clk),
    .rst_n     (rst_n),
    .we        (we),
    .d         (d_bit),
    .q         (q),
    .error_set (error_set)
  );

endmodule
