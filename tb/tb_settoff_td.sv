// tb_settoff_td -- self-checking test of the transition detector model.
//
// Drives the clock and node N directly. Checks that:
//  * while clk is high every transition of N is ignored (output stays 1);
//  * while clk is low a rising and a falling transition of N each pull
//    error_seu_bar to 0 exactly the detection delay after the transition;
//  * the output stays 0 for the rest of the low phase, also through further
//    transitions, and through a long gated (held low) clock;
//  * the next rising clock edge returns it to 1 after the clock inverter
//    delay;
//  * a legitimate write at the rising edge is not reported.
`timescale 1ps/1ps
module tb_settoff_td;
  import settoff_pkg::*;
  localparam int unsigned DET = TD_DETECT_DEFAULT_PS;

  logic clk = 1'b0, n = 1'b0, esb;
  int checks = 0, failures = 0;

  settoff_td dut (.clk(clk), .n(n), .error_seu_bar(esb));

  initial begin
    #(5000000);
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

  initial begin
    logic v;
    #1000 clk = 1'b1;                  // precharge
    #1 check(esb, 1'b1, "precharged");
    for (int i = 0; i < 40; i++) begin
      // high phase: a write flips N right after the rising edge
      v = 1'($urandom);
      n = v;
      #150 check(esb, 1'b1, "write at rising edge ignored");
      n = ~n;                          // flips while high are not TD's job
      #100 n = ~n;
      #250 check(esb, 1'b1, "disabled while clk is high");
      clk = 1'b0;
      #100 check(esb, 1'b1, "low phase, no upset");
      if (i % 3 != 2) begin
        n = ~n;                        // upset: rising or falling
        #(DET - 2) check(esb, 1'b1, "before detection delay");
        #4 check(esb, 1'b0, "upset detected after detection delay");
        #50 n = ~n;                    // flips back: stays reported
        #(DET + 50) check(esb, 1'b0, "kept low by keeper");
        if (i % 5 == 4) begin
          #20000 check(esb, 1'b0, "held while clock is gated");
        end
      end else begin
        #300 check(esb, 1'b1, "no upset in low phase");
      end
      #10 clk = 1'b1;
      #(TD_CLK_DEFAULT_PS - 1) check(esb, (i % 3 == 2), "release waits for the clock inverter");
      #2 check(esb, 1'b1, "released by rising edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
