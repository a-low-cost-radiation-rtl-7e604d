// settoff_trd -- Part I of SETTOFF: time-redundancy detection (TRD) shared by
// the bits of a register.
//
// Each bit has a detection XOR comparing its input d with its output q. The
// flip-flop wrote d at the rising clock edge, so for the rest of the high
// clock phase (the TRD interval) d and q must agree. A single error flip-flop,
// clocked at the end of the high phase, captures whether any bit disagreed.
// A disagreement there means one of:
//  * a transient pulse (SET) from logic stage L1 that was sampled at the
//    rising edge and died out within the high phase,
//  * a timing error: d settled after the rising edge but within the high
//    phase,
//  * an upset of the flip-flop's storage node during the high phase.
// error_set then asks the surrounding architecture to replay the write.
//
// The error flip-flop is clocked by the falling edge of clk. In the circuit
// its clock is the inverted clock delayed by the detection XOR delay plus its
// setup time, so that it samples the XORs for exactly the high phase; in this
// zero-delay RTL the falling edge is that instant. It captures only in write
// cycles (we sampled at the rising edge); after a hold cycle error_set is 0.
// error_set is valid from the falling edge to the next falling edge.
//
// Input d must not change in the high phase except through a fault: the next
// value may be launched only after the falling edge (the short-path
// constraint of TRD). One error flip-flop for all WIDTH bits follows the
// sharing the cell allows; the reset is this design's own addition.
`timescale 1ps/1ps
module settoff_trd #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             clk,
  input  logic             rst_n,      // asynchronous, active low
  input  logic             we,         // write enable, sampled at rising edge
  input  logic [WIDTH-1:0] d,          // inputs of the SETTOFF bits
  input  logic [WIDTH-1:0] q,          // outputs of the SETTOFF bits
  output logic             error_set   // error flip-flop output
);

  logic             write_cycle;  // the current cycle began with a write
  logic [WIDTH-1:0] mismatch;     // detection XOR outputs

  assign mismatch = d ^ q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) write_cycle <= 1'b0;
    else        write_cycle <= we;
  end

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) error_set <= 1'b0;
    else        error_set <= write_cycle & (|mismatch);
  end

endmodule
