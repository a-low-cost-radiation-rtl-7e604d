// tb_settoff_reg -- end-to-end test of the SETTOFF register.
//
// Two 8-bit registers, one with the multiplexer hold and one with the
// clock-gated hold, get the same inputs and the same particle strikes. A
// reference model tracks what each should hold. The clock runs at 1 GHz,
// symmetric. Each test cycle runs from just after one falling edge to just
// after the next:
//   low phase   optional upset of the stored value (TD interval), inputs for
//               the next rising edge are launched
//   rising edge write or hold
//   high phase  optional upset, SET pulse or late data (TRD interval)
//   falling edge error_set checked
// After a reported error the next cycle replays the write, as the
// surrounding architecture would. Every mechanism is counted and the test
// fails if one never happened: write, multiplexer hold, clock-gated hold,
// correction followed by a write (case a), by a multiplexer hold (case b) and
// by a gated hold (case c), multiple-bit upset, correction glitch, detection
// of an SET, of a timing error and of an upset in the high phase, replay.
`timescale 1ps/1ps
module tb_settoff_reg;
  import settoff_pkg::*;
  localparam int W   = 8;
  localparam int DET = TD_DETECT_DEFAULT_PS;

  typedef enum int {
    F_NONE, F_SEU_LOW, F_SEU_HIGH, F_SET, F_LATE
  } fault_e;

  typedef enum int {
    M_WRITE, M_HOLD_MUX, M_HOLD_CG, M_FIX_WRITE, M_FIX_HOLD_MUX, M_FIX_HOLD_CG,
    M_MBU, M_GLITCH, M_DET_SET, M_DET_LATE, M_DET_SEU_HIGH, M_REPLAY, M_COUNT
  } mech_e;

  logic clk = 1'b0, rst_n = 1'b0, we = 1'b0;
  logic [W-1:0] d = '0, strike = '0;
  logic [W-1:0] q_m, q_g, esb_m, esb_g;
  logic err_m, err_g;

  logic [W-1:0] ref_v;        // value both registers should hold
  logic [W-1:0] esb_exp_g;    // expected detector outputs, gated register
  int checks = 0, failures = 0;
  int mech [M_COUNT];

  settoff_reg #(.WIDTH(W), .HOLD(HOLD_MUX)) u_mux (
    .clk(clk), .rst_n(rst_n), .we(we), .d(d), .seu_strike(strike),
    .q(q_m), .error_seu_bar(esb_m), .error_set(err_m)
  );

  settoff_reg #(.WIDTH(W), .HOLD(HOLD_CLOCK_GATE)) u_cg (
    .clk(clk), .rst_n(rst_n), .we(we), .d(d), .seu_strike(strike),
    .q(q_g), .error_seu_bar(esb_g), .error_set(err_g)
  );

  always #500 clk = ~clk;

  initial begin
    #(1000 * 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_v(input logic [W-1:0] got, input logic [W-1:0] exp,
                         input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %0t %s: got %h expected %h", $time, what, got, exp);
    end
  endtask

  task automatic hit(input logic [W-1:0] mask);
    strike = mask;
    #1 strike = '0;
  endtask

  function automatic logic [W-1:0] rand_mask();
    logic [W-1:0] m;
    m = W'(1) << ($urandom % W);
    if ($urandom % 3 == 0) m |= W'($urandom);   // sometimes several bits
    return m;
  endfunction

  // One test cycle. Called 10 ps after a falling edge; returns 10 ps after
  // the next falling edge. 'err' is what error_set reported.
  task automatic run_cycle(input logic we_v, input logic [W-1:0] d_v,
                           input fault_e f, output logic err);
    logic [W-1:0] mask, cap, d_old;
    logic [W-1:0] pre_m, pre_g;
    logic exp_err;
    time t0;
    t0    = $time;
    mask  = rand_mask();
    d_old = d;
    // ---- low phase (TD interval) ----
    #50;
    if (f == F_SEU_LOW) begin
      // A bit whose detector already fired in a gated hold cannot take a
      // second upset (the detector stays low until the clock returns), so
      // strike only bits that are not being corrected.
      mask &= esb_exp_g;
      if (mask == '0) mask = esb_exp_g & (~esb_exp_g + W'(1));
    end
    if (f == F_SEU_LOW && mask != '0) begin
      pre_m = q_m;
      pre_g = q_g;
      hit(mask);
      #1 check_v(q_m, pre_m ^ mask, "glitch (mux)");
      check_v(q_g, pre_g ^ mask, "glitch (gated)");
      mech[M_GLITCH]++;
      #(DET + 5);
      check_v(q_m, ref_v, "corrected (mux)");
      check_v(q_g, ref_v, "corrected (gated)");
      check_v(esb_m, ~mask, "detector outputs (mux)");
      check_v(esb_g, esb_exp_g & ~mask, "detector outputs (gated)");
      esb_exp_g &= ~mask;
      if ($countones(mask) > 1) mech[M_MBU]++;
      if (we_v) mech[M_FIX_WRITE]++;      // case (a) follows
      else begin                          // cases (b) and (c) follow
        mech[M_FIX_HOLD_MUX]++;
        mech[M_FIX_HOLD_CG]++;
      end
    end
    // launch the inputs for the next rising edge
    #(t0 + 190 - $time);                   // 200 ps after the falling edge
    we = we_v;
    d  = (f == F_LATE) ? d_old : d_v;
    if (f == F_LATE) d = d_v ^ mask;       // old data still on the wire
    if (f == F_SET) d = d_v;
    // SET pulse straddling the rising edge
    if (f == F_SET) begin
      #200 d = d_v ^ mask;                 // 100 ps before the edge
    end
    @(posedge clk);
    // what the write captures
    cap = (f == F_SET || f == F_LATE) ? (d_v ^ mask) : d_v;
    if (we_v) begin
      ref_v     = cap;
      esb_exp_g = '1;
      mech[M_WRITE]++;
    end else begin
      mech[M_HOLD_MUX]++;
      mech[M_HOLD_CG]++;
    end
    if (f == F_SET)  #150 d = d_v;         // pulse dies in the high phase
    if (f == F_LATE) #150 d = d_v;         // data settles late
    #50;
    check_v(q_m, ref_v, "after rising edge (mux)");
    check_v(q_g, ref_v, "after rising edge (gated)");
    check_v(esb_m, '1, "detector released (mux)");
    check_v(esb_g, esb_exp_g, "detector outputs (gated)");
    if (f == F_SEU_HIGH) begin
      #50 hit(mask);
      #10 check_v(q_m, ref_v ^ mask, "upset in high phase not corrected (mux)");
      check_v(q_g, ref_v ^ mask, "upset in high phase not corrected (gated)");
    end
    // ---- falling edge: error flip-flop ----
    @(negedge clk);
    #10;
    exp_err = we_v && (f == F_SET || f == F_LATE || f == F_SEU_HIGH);
    check_v(W'(err_m), W'(exp_err), "error_set (mux)");
    check_v(W'(err_g), W'(exp_err), "error_set (gated)");
    err = err_m;
    if (err_m && exp_err) begin
      case (f)
        F_SET:      mech[M_DET_SET]++;
        F_LATE:     mech[M_DET_LATE]++;
        F_SEU_HIGH: mech[M_DET_SEU_HIGH]++;
        default: ;
      endcase
    end
  endtask

  initial begin
    logic err, prev_seu_low;
    logic [W-1:0] want;
    fault_e f;
    logic we_v;
    for (int i = 0; i < M_COUNT; i++) mech[i] = 0;
    // reset while writing zero
    d  = '0;
    we = 1'b1;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    ref_v     = '0;
    esb_exp_g = '1;
    #10;
    prev_seu_low = 1'b0;
    for (int i = 0; i < 1200; i++) begin
      // choose this cycle
      we_v = ($urandom % 3 != 0);
      want = W'($urandom);
      case ($urandom % 8)
        0, 1:    f = F_SEU_LOW;
        2:       f = F_SEU_HIGH;
        3:       f = F_SET;
        4:       f = F_LATE;
        default: f = F_NONE;
      endcase
      if (!we_v && f != F_SEU_LOW) f = F_NONE;   // faults on d only in writes
      run_cycle(we_v, want, f, err);
      // replay: rewrite the intended value after a reported error
      if (err) begin
        mech[M_REPLAY]++;
        run_cycle(1'b1, want, F_NONE, err);
        check_v(q_m, want, "replayed write (mux)");
        check_v(q_g, want, "replayed write (gated)");
      end
    end
    // every mechanism must have happened
    for (int m = 0; m < M_COUNT; m++) begin
      checks++;
      if (mech[m] == 0) begin
        failures++;
        $display("FAIL mechanism %s never happened", mech_e'(m));
      end
    end
    $display("mechanisms: write=%0d hold_mux=%0d hold_cg=%0d fix_write=%0d fix_hold_mux=%0d fix_hold_cg=%0d mbu=%0d glitch=%0d",
             mech[M_WRITE], mech[M_HOLD_MUX], mech[M_HOLD_CG], mech[M_FIX_WRITE],
             mech[M_FIX_HOLD_MUX], mech[M_FIX_HOLD_CG], mech[M_MBU], mech[M_GLITCH]);
    $display("detections: set=%0d late=%0d seu_high=%0d replay=%0d",
             mech[M_DET_SET], mech[M_DET_LATE], mech[M_DET_SEU_HIGH], mech[M_REPLAY]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
