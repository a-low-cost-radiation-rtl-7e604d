// tb_settoff_main_ff -- self-checking test of the main flip-flop model.
//
// Writes random data on rising clock edges and checks that node N holds the
// inverse of the written bit, that a strike in either clock phase flips N at
// once, that a second strike flips it back, and that the next write
// overwrites an upset value. Clock period 1000 ps.
`timescale 1ps/1ps
module tb_settoff_main_ff;
  logic clk = 1'b0, d = 1'b0, strike = 1'b0, n;
  logic written;
  int checks = 0, failures = 0;

  settoff_main_ff dut (.clk(clk), .d(d), .seu_strike(strike), .n(n));

  always #500 clk = ~clk;

  initial begin
    #(1000 * 2000);
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
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      #100 d = 1'($urandom);
      written = d;
      @(posedge clk);
      #20 check(n, !written, "write");
      case (i % 4)
        1: begin                      // strike in the high phase
          #100 hit();
          #5 check(n, written, "strike in high phase");
        end
        2: begin                      // strike in the low phase
          @(negedge clk);
          #200 hit();
          #5 check(n, written, "strike in low phase");
        end
        3: begin                      // double strike
          @(negedge clk);
          #100 hit();
          #50 hit();
          #5 check(n, !written, "double strike");
        end
        default: begin
          @(negedge clk);
          #300 check(n, !written, "hold through low phase");
        end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
