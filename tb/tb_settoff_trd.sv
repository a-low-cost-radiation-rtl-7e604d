// tb_settoff_trd -- self-checking test of the shared TRD detection stage.
//
// WIDTH = 4. The test drives the bits' inputs d and outputs q directly, as
// the SETTOFF bits would see them, and checks error_set after each falling
// edge against a reference: it must be 1 exactly when the cycle began with a
// write and some bit's d and q differ at the end of the high phase. A
// difference present only earlier in the high phase, or only in the low
// phase, must not be reported, and the flag must hold its value until the
// next falling edge. Reset clears it.
`timescale 1ps/1ps
module tb_settoff_trd;
  localparam int W = 4;

  logic clk = 1'b0, rst_n = 1'b0, we = 1'b0;
  logic [W-1:0] d = '0, q = '0;
  logic err;
  logic exp_err;
  int checks = 0, failures = 0;
  int n_reported = 0;

  settoff_trd #(.WIDTH(W)) dut (
    .clk(clk), .rst_n(rst_n), .we(we), .d(d), .q(q), .error_set(err)
  );

  always #500 clk = ~clk;

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

  initial begin
    logic [W-1:0] v, flip;
    int kind;
    repeat (2) @(posedge clk);
    #10 check(err, 1'b0, "reset");
    @(negedge clk);
    #100 rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      // low phase: next inputs
      v    = W'($urandom);
      we   = 1'($urandom);
      kind = int'($urandom % 4);
      flip = W'(1) << ($urandom % W);
      if ($urandom % 3 == 0) flip |= W'($urandom);
      d = v;
      q = v;
      @(posedge clk);
      exp_err = 1'b0;
      case (kind)
        1: begin                     // mismatch through the falling edge
          #100 q = v ^ flip;
          exp_err = we;
        end
        2: begin                     // mismatch that ends early
          #100 q = v ^ flip;
          #200 q = v;
        end
        default: ;
      endcase
      @(negedge clk);
      #10 check(err, exp_err, "error_set after falling edge");
      if (err) n_reported++;
      if (kind == 3) q = v ^ flip;   // mismatch in the low phase only
      #400 check(err, exp_err, "error_set held through the low phase");
      if (i == 250) begin            // reset in the middle
        rst_n = 1'b0;
        #10 check(err, 1'b0, "asynchronous reset");
        #10 rst_n = 1'b1;
      end
    end
    checks++;
    if (n_reported == 0) begin
      failures++;
      $display("FAIL no error ever reported");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
