// tb_settoff_pipeline -- a correction glitch crossing to the next stage.
//
// Two SETTOFF flip-flops (default parameters) form a pipeline: stage 1
// drives a 10 ps combinational path into stage 2, and both write every cycle
// with a 1 GHz symmetric clock. In each trial stage 1 holds a known bit v and
// is struck in its low phase, a sweep of offsets before the rising edge. Its
// correction glitch travels to stage 2. Where the glitch straddles the rising
// edge, stage 2 captures the wrong value; the check is that it then always
// raises error_set at the falling edge (the glitch has gone by then, so its
// input no longer matches its output), and that a replayed write repairs it.
// Where the glitch misses the edge, stage 2 must hold v and stay silent.
// Stage 1 is overwritten with v at the edge and must never report an error.
`timescale 1ps/1ps
module tb_settoff_pipeline;
  localparam int CL_PS = 10;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [0:0] d1 = '0, q1, esb1, strike1 = '0;
  logic [0:0] d2, q2, esb2;
  logic err1, err2;
  int checks = 0, failures = 0;
  int n_captured = 0, n_flagged = 0, n_missed = 0;

  settoff_reg u_stage1 (
    .clk(clk), .rst_n(rst_n), .we(1'b1), .d(d1), .seu_strike(strike1),
    .q(q1), .error_seu_bar(esb1), .error_set(err1)
  );

  // combinational logic between the stages: a path of CL_PS
  always @(q1) d2 <= #(CL_PS) q1;

  settoff_reg u_stage2 (
    .clk(clk), .rst_n(rst_n), .we(1'b1), .d(d2), .seu_strike(1'b0),
    .q(q2), .error_seu_bar(esb2), .error_set(err2)
  );

  always #500 clk = ~clk;

  initial begin
    #(1000 * 5000);
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
    logic wrong;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int x = 250; x < 500; x++) begin
      v = 1'($urandom);
      d1 = v;
      repeat (3) @(posedge clk);               // both stages hold v
      @(negedge clk);
      #(x) strike1 = 1'b1;                     // upset of stage 1, low phase
      #1 strike1 = 1'b0;
      @(posedge clk);
      #50 check(q1[0], v, "stage 1 rewritten");
      wrong = (q2[0] != v);
      if (wrong) n_captured++;
      else       n_missed++;
      @(negedge clk);
      #10;
      check(err1, 1'b0, "stage 1 reports nothing");
      check(err2, wrong, "stage 2 flags a captured glitch");
      if (wrong && err2) n_flagged++;
      @(posedge clk);                          // replay: write again
      #50 check(q2[0], v, "stage 2 after replay");
    end
    checks += 2;
    if (n_captured == 0) begin
      failures++;
      $display("FAIL no glitch was ever captured by stage 2");
    end
    if (n_missed == 0) begin
      failures++;
      $display("FAIL every glitch was captured");
    end
    $display("glitches captured by stage 2: %0d (all flagged: %0d), missed: %0d",
             n_captured, n_flagged, n_missed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
