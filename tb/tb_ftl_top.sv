// tb_ftl_top: end-to-end test of the IF frequency tracking loop at its default
// parameters.
//
// The testbench plays the parts outside the chip: a central node whose
// reference, received and mixed down with an LO at N_SYN times the DCO
// frequency, gives IF = |f_ref - N_SYN * f_dco|, and the limiting comparator
// that turns it into the square wave IF'(t). The IF square wave is generated by
// phase accumulation in 5-ns steps, so a code change acts at once. Noise glitches
// are added as short pulses, each making one extra rising edge, at random times
// (Bernoulli trials every T_D = 50 ns), as in the glitch model of the loop's
// analysis.
//
// Three searches run from the same free-running code 20000 (nominal 5 MHz)
// against references that put the target code at +0.06 %, +2.5 % and -2.8 %.
// Each must lock with a residual frequency error within +-100 ppm (the accuracy
// the 4.85 Mb/s link needs; the search aims at +-50 ppm but can end one code
// step further when the target lies on a window median), take ten decisions,
// open every accumulation window for L * T_ACC (L = 1, 4, 16 by stage,
// T_ACC = 8 us) within one DCO period, start from the window edges
// C/(1 -+ 0.03), and finish after the 1072 us that the twenty windows take but
// within 1400 us (division, settling and read overheads). The search window
// must halve, to within a code step, at every iteration; its width is printed
// as a convergence trace. The run counts how often each mechanism occurred:
// the three tuning stages, a decision for the high and for the low half, glitch
// edges inside a window, and a lock; one that never occurred is a failure.
module tb_ftl_top;
  import ftl_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  localparam real   N_SYN     = 87.0;
  localparam real   T_UNIT_NS = 0.01;     // DCO unit delay, 10 ps
  localparam real   TACC_NS   = 8000.0;   // T_ACC
  localparam real   STEP_NS   = 5.0;      // IF phase accumulation step
  localparam real   TD_NS     = 50.0;     // glitch trial interval
  localparam int    GLITCH_PPM = 500;     // glitch probability per trial, ppm

  logic              rst_n = 1'b1;
  logic              if_in;
  logic              start = 1'b0;
  logic [CODE_W-1:0] c_init = CODE_W'(20000);
  logic              sys_clk;
  logic [CODE_W-1:0] c_dco;
  logic              busy, locked, dec_valid, dec_high, acc_gate;
  tuning_stage_e     stage;
  logic [3:0]        iter;
  logic [NIF_W-1:0]  n_if;

  ftl_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- RF front end and limiter model ----------------
  real c_target = 20012.34;   // code at which N_SYN * f_dco equals f_ref
  real phase = 0.0;
  logic if_sq = 1'b0, glitch = 1'b0;
  assign if_in = if_sq ^ glitch;

  always begin
    real f_dco, f_ref, f_if;
    #(STEP_NS);
    f_dco = 1.0e9 / (real'(c_dco) * T_UNIT_NS);
    f_ref = N_SYN * 1.0e9 / (c_target * T_UNIT_NS);
    f_if  = f_ref - N_SYN * f_dco;
    if (f_if < 0.0) f_if = -f_if;
    phase = phase + 2.0 * f_if * STEP_NS * 1.0e-9;   // in half periods
    if (phase >= 1.0) begin
      phase = phase - 1.0;
      if_sq = ~if_sq;
    end
  end

  int glitches_in_gate = 0;
  always begin
    #(TD_NS);
    if (($urandom % 1000000) < GLITCH_PPM) begin
      if (acc_gate) glitches_in_gate++;
      glitch = 1'b1;
      #2 glitch = 1'b0;
    end
  end

  // ---------------- mechanism counters and window checks ----------------
  int n_stage[3] = '{0, 0, 0};
  int n_high = 0, n_low = 0, n_lock = 0, n_dec = 0, n_gate = 0;
  realtime t_gate_rise;
  int l_at_rise;
  real per_at_rise;
  logic [CODE_W-1:0] code_at_gate[$];

  always @(posedge acc_gate) begin
    t_gate_rise = $realtime;
    l_at_rise   = (stage == STG_COARSE) ? 1 : (stage == STG_FINE1) ? 4 : 16;
    per_at_rise = real'(c_dco) * T_UNIT_NS;
    n_stage[int'(stage)]++;
    code_at_gate.push_back(c_dco);
    n_gate++;
  end

  always @(negedge acc_gate) begin
    real dur, want;
    dur  = $realtime - t_gate_rise;
    want = real'(l_at_rise) * TACC_NS;
    check((dur - want < per_at_rise) && (want - dur < per_at_rise),
          $sformatf("window %0d lasts %0.1f ns, expected %0.1f +- %0.1f", n_gate, dur, want, per_at_rise));
  end

  always @(posedge sys_clk) if (dec_valid) begin
    n_dec++;
    if (dec_high) n_high++; else n_low++;
  end

  // ---------------- one search ----------------
  task automatic run_search(input real target);
    realtime t0, t_lock;
    real ppm, t_us;
    int dec0, exp_l1, exp_h1;
    c_target = target;
    code_at_gate.delete();
    dec0 = n_dec;
    @(negedge sys_clk) start = 1'b1;
    @(negedge sys_clk) start = 1'b0;
    t0 = $realtime;
    wait (locked);
    t_lock = $realtime;
    n_lock++;
    ppm  = (target / real'(c_dco) - 1.0) * 1.0e6;
    t_us = (t_lock - t0) / 1000.0;
    $display("target %0.2f: locked at code %0d, error %0.1f ppm, tracking %0.1f us",
             target, c_dco, ppm, t_us);
    check(ppm <= 100.0 && ppm >= -100.0, $sformatf("residual error %0.1f ppm", ppm));
    check(n_dec - dec0 == 10, $sformatf("%0d decisions, expected 10", n_dec - dec0));
    check(t_us > 1072.0 && t_us < 1400.0, $sformatf("tracking time %0.1f us", t_us));
    // first window edges: C_L,1 = C/(1-eps), C_H,1 = C/(1+eps) in 2^-16 steps, rounded
    exp_l1 = (int'(c_init) * 65536 + 31785) / 63570;
    exp_h1 = (int'(c_init) * 65536 + 33751) / 67502;
    check(code_at_gate.size() == 20, $sformatf("%0d windows, expected 20", code_at_gate.size()));
    if (code_at_gate.size() >= 2) begin
      check(int'(code_at_gate[0]) == exp_l1, $sformatf("C_L,1 = %0d, expected %0d", code_at_gate[0], exp_l1));
      check(int'(code_at_gate[1]) == exp_h1, $sformatf("C_H,1 = %0d, expected %0d", code_at_gate[1], exp_h1));
    end
    // convergence trace: the window measured in iteration n spans codes
    // code_at_gate[2n] (low frequency) to code_at_gate[2n+1] (high frequency).
    // Its width in frequency, f_H - f_L in ppm of 5 MHz, must halve from one
    // iteration to the next, to within the rounding of two code steps
    if (code_at_gate.size() == 20) begin
      real w[10];
      for (int n = 0; n < 10; n++) begin
        w[n] = 1.0e6 * 20000.0 * (1.0 / real'(code_at_gate[2*n+1]) - 1.0 / real'(code_at_gate[2*n]));
        $display("  iteration %0d: window %0.0f ppm wide", n, w[n]);
        if (n > 0)
          check(2.0 * w[n] - w[n-1] <= 110.0 && w[n-1] - 2.0 * w[n] <= 110.0,
                $sformatf("iteration %0d: window %0.0f ppm after %0.0f ppm", n, w[n], w[n-1]));
      end
    end
    repeat (20) @(posedge sys_clk);
    check(locked && !busy && c_dco == dut.c_dco, "lock held after the search");
  endtask

  // assert reset with an edge, so that the asynchronous reset takes effect
  initial #0.5 rst_n = 1'b0;

  initial begin
    void'($urandom(7));
    #1000 rst_n = 1'b1;
    repeat (5) @(posedge sys_clk);
    check(c_dco == c_init && !locked && !busy, "idle DCO runs at the free-running code");
    run_search(20012.34);
    run_search(20000.0 * 1.025 + 0.3);
    run_search(20000.0 * 0.972 + 0.7);
    check(n_stage[0] > 0, "coarse stage never ran");
    check(n_stage[1] > 0, "first fine stage never ran");
    check(n_stage[2] > 0, "second fine stage never ran");
    check(n_high > 0, "high half never kept");
    check(n_low > 0, "low half never kept");
    check(glitches_in_gate > 0, "no glitch fell in a window");
    check(n_lock == 3, "not every search locked");
    $display("mechanisms: coarse=%0d fine1=%0d fine2=%0d windows, high=%0d low=%0d decisions, glitches=%0d, locks=%0d",
             n_stage[0], n_stage[1], n_stage[2], n_high, n_low, glitches_in_gate, n_lock);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
