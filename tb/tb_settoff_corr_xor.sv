// tb_settoff_corr_xor -- self-checking test of the correction XOR.
//
// Applies all four combinations of storage node N and error_seu_bar and
// checks that Q is the inverse of N in normal operation (error_seu_bar = 1)
// and N itself while an upset is being corrected (error_seu_bar = 0).
`timescale 1ps/1ps
module tb_settoff_corr_xor;
  logic n, esb, q;
  int checks = 0, failures = 0;

  settoff_corr_xor dut (.n(n), .error_seu_bar(esb), .q(q));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      n   = i[0];
      esb = i[1];
      #10;
      checks++;
      // normal operation: the replaced inverter; correcting: pass N
      if (q !== (esb ? !n : n)) begin
        failures++;
        $display("FAIL n=%0b error_seu_bar=%0b q=%0b", n, esb, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
