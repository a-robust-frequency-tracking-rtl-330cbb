// tb_ftl_cbst_controller: checks the CBST controller on its own, with the
// control timer and the IF counter replaced by testbench models.
//
// The timer model raises `tmr_done` n_dco clocks after `tmr_start`. The IF
// counter model returns the count an ideal front end would give over the
// window, round(T' * |f_ref - 87 * f_dco|), with T' = n_dco * C_DCO * 10 ps and
// f_dco = 1 / (C_DCO * 10 ps), plus a glitch bias of 5 to 7 counts. In parallel
// the testbench runs its own copy of the search, written from the equations
// (window edges C/(1 -+ 0.03), median 2 C_L C_H / (C_L + C_H), timer load
// L * T_ACC / C, all rounded to nearest), and checks every code, timer load,
// stage and decision against it, then the locked result and its frequency
// error. The clock period is irrelevant here; 10 ns is used.
module tb_ftl_cbst_controller;
  import ftl_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  logic              clk = 1'b0, rst_n = 1'b1, start = 1'b0;
  logic [CODE_W-1:0] c_init = CODE_W'(20000), c_dco;
  logic              busy, locked, dec_valid, dec_high;
  tuning_stage_e     stage;
  logic [3:0]        iter;
  logic              tmr_start, tmr_done = 1'b0, if_clr;
  logic [NDCO_W-1:0] tmr_n_dco;
  logic [NIF_W-1:0]  n_if = '0;

  ftl_cbst_controller dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  real c_target;

  function automatic int model_count(input int c, input int n);
    real f_dco, f_ref, t_acc, f_if;
    f_dco = 1.0e11 / real'(c);
    f_ref = 87.0 * 1.0e11 / c_target;
    t_acc = real'(n) * real'(c) * 1.0e-11;
    f_if  = f_ref - 87.0 * f_dco;
    if (f_if < 0.0) f_if = -f_if;
    return int'(t_acc * f_if + 0.5) + 5 + int'($urandom_range(0, 2));
  endfunction

  // one measurement: wait for the timer start, check it, answer after n_dco clocks
  task automatic measure(input int want_c, input int l, input tuning_stage_e want_stage,
                         output int count);
    int want_n, waited = 0;
    while (!tmr_start && waited < 100000) begin @(posedge clk); waited++; end
    want_n = (l * 800000 + want_c / 2) / want_c;
    check(int'(c_dco) == want_c, $sformatf("measuring code %0d, expected %0d", c_dco, want_c));
    check(int'(tmr_n_dco) == want_n, $sformatf("timer load %0d, expected %0d", tmr_n_dco, want_n));
    check(stage == want_stage, $sformatf("stage %0d, expected %0d", stage, want_stage));
    check(!if_clr, "counter released during the window");
    count = model_count(want_c, want_n);
    repeat (want_n) @(posedge clk);
    #1 begin tmr_done = 1'b1; n_if = NIF_W'(count); end
    @(posedge clk);
    #1 tmr_done = 1'b0;
    @(posedge clk);
  endtask

  task automatic search(input real target);
    int cl, ch, cm, nl, nh, l, total_n = 0, cycles = 0;
    tuning_stage_e st;
    real ppm;
    c_target = target;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cm = int'(c_init);
    ch = (cm * 65536 + 33751) / 67502;
    cl = (cm * 65536 + 31785) / 63570;
    for (int it = 0; it < 10; it++) begin
      l  = (it < 3) ? 1 : (it < 7) ? 4 : 16;
      st = (it < 3) ? STG_COARSE : (it < 7) ? STG_FINE1 : STG_FINE2;
      measure(cl, l, st, nl);
      measure(ch, l, st, nh);
      total_n += (l * 800000 + cl / 2) / cl + (l * 800000 + ch / 2) / ch;
      while (!dec_valid && cycles < 1000) begin @(posedge clk); cycles++; end
      check(dec_high == (nh < nl), $sformatf("iteration %0d decision", it));
      check(int'(iter) == it, "iteration number");
      if (nh < nl) cl = cm; else ch = cm;
      cm = (2 * cl * ch + (cl + ch) / 2) / (cl + ch);
      @(posedge clk);
    end
    cycles = 0;
    while (!locked && cycles < 1000) begin @(posedge clk); cycles++; end
    ppm = (target / real'(c_dco) - 1.0) * 1.0e6;
    $display("target %0.2f: locked at %0d (reference %0d), %0.1f ppm", target, c_dco, cm, ppm);
    check(locked && !busy, "locked after ten iterations");
    check(int'(c_dco) == cm, $sformatf("result %0d, reference %0d", c_dco, cm));
    check(ppm < 100.0 && ppm > -100.0, $sformatf("residual error %0.1f ppm", ppm));
    repeat (5) @(posedge clk);
    check(locked && int'(c_dco) == cm, "result held");
  endtask

  // assert reset with an edge, so that the asynchronous reset takes effect
  initial #0.5 rst_n = 1'b0;

  initial begin
    void'($urandom(9));
    #22 rst_n = 1'b1;
    repeat (3) @(posedge clk);
    check(c_dco == c_init && !busy && !locked, "idle follows the free-running code");
    search(20123.4);
    search(19555.5);
    c_init = CODE_W'(19800);
    search(20300.8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
