// tb_ftl_core: checks the digital IF-FTL (frequency detector plus CBST
// controller) with a fixed 5 MHz clock and an IF'(t) model.
//
// The clock does not follow the code here, so the window lengths are
// L * T_ACC / C_DCO clock cycles of 200 ns; the IF frequency still follows
// the code as in the real loop, IF = |f_ref - 87 / (C_DCO * 10 ps)|, generated
// by phase accumulation with occasional glitch edges. For every window the
// testbench counts the IF' edges itself and checks that the count the
// controller reads equals it, and that the gate lasted round(L * T_ACC / C_DCO)
// clocks. The search must end locked within +-100 ppm of the target.
module tb_ftl_core;
  import ftl_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  logic              clk = 1'b0, rst_n = 1'b1, start = 1'b0, if_in;
  logic [CODE_W-1:0] c_init = CODE_W'(20000), c_dco;
  logic              busy, locked, dec_valid, dec_high, acc_gate;
  tuning_stage_e     stage;
  logic [3:0]        iter;
  logic [NIF_W-1:0]  n_if;

  ftl_core dut (.*);

  always #100 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  real  c_target = 20222.2;
  real  phase = 0.0;
  logic if_sq = 1'b0, glitch = 1'b0;
  assign if_in = if_sq ^ glitch;

  always begin
    real f_if;
    #5;
    f_if = 87.0 * (1.0e11 / c_target - 1.0e11 / real'(c_dco));
    if (f_if < 0.0) f_if = -f_if;
    phase = phase + 2.0 * f_if * 5.0e-9;
    if (phase >= 1.0) begin phase = phase - 1.0; if_sq = ~if_sq; end
  end

  always begin
    #50;
    if ($urandom_range(0, 9999) < 5) begin glitch = 1'b1; #2 glitch = 1'b0; end
  end

  // independent edge count inside each window; the expected window length is
  // round(L * T_ACC / (C_DCO * 10 ps)) clocks, with L = 1, 4, 16 by stage
  int edges = 0, windows = 0, gate_cycles = 0, load = 0;
  always @(posedge if_in) if (acc_gate) edges++;
  always @(posedge acc_gate) begin
    int l;
    l = (stage == STG_COARSE) ? 1 : (stage == STG_FINE1) ? 4 : 16;
    load = (l * 800000 + int'(c_dco) / 2) / int'(c_dco);
  end
  always @(posedge clk) begin
    if (acc_gate) gate_cycles++;
  end
  always @(negedge acc_gate) if (rst_n) begin
    repeat (2) @(posedge clk);
    windows++;
    check(int'(n_if) == edges, $sformatf("window %0d: N_IF %0d, edges seen %0d", windows, n_if, edges));
    check(gate_cycles == load, $sformatf("window %0d: gate %0d cycles, expected %0d", windows, gate_cycles, load));
    edges = 0;
    gate_cycles = 0;
  end

  int n_dec = 0;
  always @(posedge clk) if (dec_valid) n_dec++;

  // assert reset with an edge, so that the asynchronous reset takes effect
  initial #0.5 rst_n = 1'b0;

  initial begin
    real ppm;
    void'($urandom(21));
    #350 rst_n = 1'b1;
    repeat (3) @(posedge clk);
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    wait (locked);
    ppm = (c_target / real'(c_dco) - 1.0) * 1.0e6;
    $display("locked at %0d, %0.1f ppm", c_dco, ppm);
    check(ppm < 100.0 && ppm > -100.0, $sformatf("residual error %0.1f ppm", ppm));
    check(windows == 20 && n_dec == 10, $sformatf("%0d windows, %0d decisions", windows, n_dec));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
