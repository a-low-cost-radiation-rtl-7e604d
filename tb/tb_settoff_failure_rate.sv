// tb_settoff_failure_rate -- Monte Carlo of the SET and SEU failure rates of
// a SETTOFF flip-flop, on the register with all parameters at their defaults
// (one bit, multiplexer hold).
//
// Each trial writes a known bit v, then lets a transient pulse of the
// opposite value reach d during one clock cycle, as a particle strike in the
// preceding logic would:
//   pulse start  D + alpha*T after the rising edge, alpha uniform in [0,1)
//   pulse width  w
//   next rising edge T after the first, falling edge tau*T after that
// with D, T and w drawn from normal distributions. The trial is a
// conventional-flip-flop failure if the next rising edge captures the pulse
// (q != v), and a SETTOFF failure if it captures it and error_set stays low,
// i.e. the pulse outlasted the high clock phase and no replay is requested.
//
// The measured rates are compared with the closed-form model of the same
// experiment, averaged over alpha:
//   g1  = Phi(((1-a)muT - muD) / sqrt(sD^2 + ((1-a)sT)^2))
//   g2  = Phi((muD + muw - (1-a)muT) / sqrt(sD^2 + sw^2 + ((1-a)sT)^2))
//   g2' = Phi((muD + muw - (1+tau-a)muT) / sqrt(sD^2 + sw^2 + ((1+tau-a)sT)^2))
//   conventional rate = mean(g1*g2), SETTOFF rate = mean(g1*g2')
// within 3.5 percentage points, and SETTOFF must fail less often.
//
// Three experiments, with 65 nm figures: muT = 1000 ps (1 GHz), sT = 10 %,
// muD = 10 ps, sD = 10 %:
//   1. SET pulses, muw = 530 ps, sw = 150 ps, symmetric clock (tau = 0.5)
//   2. the same pulses with an 800 ps high phase (tau = 0.8)
//   3. correction glitches of an upstream SETTOFF as the pulse,
//      muw = 98 ps, sw = 33 ps, tau = 0.5: the SEU failure rate, which must
//      be 0.
`timescale 1ps/1ps
module tb_settoff_failure_rate;
  localparam int TRIALS = 2000;

  logic clk = 1'b0, rst_n = 1'b0, we = 1'b1;
  logic [0:0] d = '0, q, esb;
  logic err;
  int checks = 0, failures = 0;

  settoff_reg dut (
    .clk(clk), .rst_n(rst_n), .we(we), .d(d), .seu_strike(1'b0),
    .q(q), .error_seu_bar(esb), .error_set(err)
  );

  initial begin
    #(64'd1000 * 200000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- random numbers ----
  function automatic real uniform();
    return real'($urandom) / 4294967296.0;
  endfunction

  // standard normal, sum of twelve uniforms
  function automatic real gauss(real mu, real sigma);
    real s = 0.0;
    for (int i = 0; i < 12; i++) s += uniform();
    return mu + sigma * (s - 6.0);
  endfunction

  // ---- closed-form model ----
  function automatic real erf_approx(real x);
    // Abramowitz and Stegun 7.1.26, absolute error below 1.5e-7
    real t, y, ax;
    ax = (x < 0.0) ? -x : x;
    t  = 1.0 / (1.0 + 0.3275911 * ax);
    y  = 1.0 - (((((1.061405429 * t - 1.453152027) * t) + 1.421413741) * t
                 - 0.284496736) * t + 0.254829592) * t * $exp(-ax * ax);
    return (x < 0.0) ? -y : y;
  endfunction

  function automatic real phi(real x);
    return 0.5 + 0.5 * erf_approx(x / $sqrt(2.0));
  endfunction

  function automatic real model_rate(real mu_t, real s_t, real mu_d, real s_d,
                                     real mu_w, real s_w, real tau, bit settoff);
    real acc = 0.0, a, g1, g2, k;
    for (int i = 0; i < 1000; i++) begin
      a  = (real'(i) + 0.5) / 1000.0;
      g1 = phi(((1.0 - a) * mu_t - mu_d) / $sqrt(s_d * s_d + ((1.0 - a) * s_t) ** 2));
      k  = settoff ? (1.0 + tau - a) : (1.0 - a);
      g2 = phi((mu_d + mu_w - k * mu_t) / $sqrt(s_d * s_d + s_w * s_w + (k * s_t) ** 2));
      acc += g1 * g2;
    end
    return acc / 1000.0;
  endfunction

  // ---- clock cycles ----
  task automatic clean_cycle(input logic v);
    d = v;
    clk = 1'b1;
    #500 clk = 1'b0;
    #500;
  endtask

  // One trial: returns whether the edge captured the pulse and whether
  // error_set was raised for that write.
  task automatic trial(input real mu_w, input real s_w, input real tau,
                       output bit captured, output bit flagged);
    logic v;
    real  t_clk, dly, alpha, w;
    int   t_hi, t_lo, t_start, t_width;
    v = 1'($urandom);
    repeat (3) clean_cycle(v);
    t_clk = gauss(1000.0, 100.0);
    dly   = gauss(10.0, 1.0);
    alpha = uniform();
    w     = gauss(mu_w, s_w);
    if (w < 1.0) w = 1.0;
    t_hi    = int'(tau * t_clk);
    t_lo    = int'(t_clk) - t_hi;
    t_start = int'(dly + alpha * t_clk);
    t_width = int'(w);
    if (t_start < 1) t_start = 1;
    if (t_width < 1) t_width = 1;
    fork
      begin                                    // the pulse on d
        #(t_start) d = ~v;
        #(t_width) d = v;
      end
      begin                                    // two clock cycles of period T
        clk = 1'b1;
        #(t_hi) clk = 1'b0;
        #(t_lo) clk = 1'b1;                    // the edge that may capture
        #(t_hi) clk = 1'b0;                    // end of the TRD interval
        #10;
        captured = (q[0] != v);
        flagged  = err;
      end
    join
    #600;
    repeat (3) clean_cycle(v);
  endtask

  task automatic experiment(input string name, input real mu_w, input real s_w,
                            input real tau, input bit expect_zero);
    int n_conv = 0, n_settoff = 0, n_flag = 0;
    bit cap, flg;
    real r_conv, r_settoff, m_conv, m_settoff;
    for (int i = 0; i < TRIALS; i++) begin
      trial(mu_w, s_w, tau, cap, flg);
      if (cap) n_conv++;
      if (cap && !flg) n_settoff++;
      if (flg) n_flag++;
    end
    r_conv    = real'(n_conv) / real'(TRIALS);
    r_settoff = real'(n_settoff) / real'(TRIALS);
    m_conv    = model_rate(1000.0, 100.0, 10.0, 1.0, mu_w, s_w, tau, 1'b0);
    m_settoff = model_rate(1000.0, 100.0, 10.0, 1.0, mu_w, s_w, tau, 1'b1);
    $display("%s: conventional %5.2f%% (model %5.2f%%), SETTOFF %5.2f%% (model %5.2f%%), replays requested %0d of %0d",
             name, 100.0 * r_conv, 100.0 * m_conv, 100.0 * r_settoff,
             100.0 * m_settoff, n_flag, TRIALS);
    checks += 3;
    if ((r_conv - m_conv > 0.035) || (m_conv - r_conv > 0.035)) begin
      failures++;
      $display("FAIL %s: conventional rate off the model", name);
    end
    if ((r_settoff - m_settoff > 0.035) || (m_settoff - r_settoff > 0.035)) begin
      failures++;
      $display("FAIL %s: SETTOFF rate off the model", name);
    end
    if (expect_zero ? (n_settoff != 0) : (n_settoff >= n_conv)) begin
      failures++;
      $display("FAIL %s: SETTOFF failures %0d, conventional %0d", name, n_settoff, n_conv);
    end
  endtask

  initial begin
    repeat (3) clean_cycle(1'b0);
    rst_n = 1'b1;
    experiment("SET pulses, 500 ps TRD interval", 530.0, 150.0, 0.5, 1'b0);
    experiment("SET pulses, 800 ps TRD interval", 530.0, 150.0, 0.8, 1'b0);
    experiment("correction glitches (SEU failure rate)", 98.0, 33.0, 0.5, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
