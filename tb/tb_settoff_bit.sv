// tb_settoff_bit -- self-checking test of one SETTOFF bit (Part II).
//
// Clock period 1000 ps, symmetric. Each cycle writes a random bit and checks
// Q after the rising edge. Then, in turn:
//  * an upset of N in the low phase: Q must show the flipped value for the
//    detection delay (the correction glitch, whose width is measured) and
//    then the written value again, with error_seu_bar at 0 until the next
//    rising edge, where a new write restores normal operation;
//  * an upset in the high phase: the bit does not correct it (the detector is
//    disabled), so Q stays flipped until the next write;
//  * a two-cycle gated clock after an upset: Q stays corrected.
`timescale 1ps/1ps
module tb_settoff_bit;
  import settoff_pkg::*;
  localparam int unsigned DET = TD_DETECT_DEFAULT_PS;

  logic clk_run = 1'b0, gate = 1'b1, d = 1'b0, strike = 1'b0;
  logic clk, q, n, esb;
  logic written;
  time  t_flip, t_fix;
  int checks = 0, failures = 0;

  assign clk = clk_run & gate;

  settoff_bit dut (
    .clk(clk), .d(d), .seu_strike(strike),
    .q(q), .n(n), .error_seu_bar(esb)
  );

  always #500 clk_run = ~clk_run;

  initial begin
    #(1000 * 3000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %0t %s: got %0b expected %0b", $time, what, got, exp);
    end
  endtask

  task automatic hit();
    strike = 1'b1;
    #1 strike = 1'b0;
  endtask

  initial begin
    for (int i = 0; i < 300; i++) begin
      @(negedge clk_run);
      #100 d = 1'($urandom);
      written = d;
      @(posedge clk_run);
      #200 check(q, written, "write");
      check(esb, 1'b1, "normal operation");
      check(n, !written, "N holds inverse of Q");
      case (i % 3)
        1: begin                               // upset in the TD interval
          @(negedge clk_run);
          #200 t_flip = $time;
          hit();
          #1 check(q, !written, "correction glitch starts");
          wait (q == written);
          t_fix = $time;
          checks++;
          if (t_fix - t_flip != DET) begin
            failures++;
            $display("FAIL glitch width %0t ps, expected %0d ps", t_fix - t_flip, DET);
          end
          #5 check(esb, 1'b0, "error_seu_bar low while correcting");
          check(n, written, "N still upset, Q corrected");
          if (i % 2 == 0) begin                // clock gated for two cycles
            gate = 1'b0;
            repeat (2) @(posedge clk_run);
            #300 check(q, written, "stays corrected while clock is gated");
            check(esb, 1'b0, "error_seu_bar held while clock is gated");
            @(negedge clk_run);
            #10 gate = 1'b1;
          end
        end
        2: begin                               // upset in the TRD interval
          #50 hit();
          #200 check(q, !written, "no correction in high phase");
          @(negedge clk_run);
          #300 check(q, !written, "uncorrected upset persists");
        end
        default: begin
          @(negedge clk_run);
          #400 check(q, written, "hold through low phase");
        end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
