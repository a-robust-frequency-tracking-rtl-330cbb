// tb_ftl_ctrl_timer: checks that the control timer opens its gate for exactly
// the loaded number of clock cycles, starting the cycle after `start`, and
// pulses `done` once, in the cycle the gate closes. Loads are random between 0
// and 300, plus the edge cases 0 and 1 and a restart while counting.
module tb_ftl_ctrl_timer;
  timeunit 1ns;
  timeprecision 1ps;

  logic        clk = 1'b0, rst_n = 1'b1, start = 1'b0;
  logic [15:0] n_dco = '0;
  logic        gate, done;

  ftl_ctrl_timer dut (.clk, .rst_n, .start, .n_dco, .gate, .done);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input int n);
    int high = 0, dones = 0, waited = 0;
    @(negedge clk) begin start = 1'b1; n_dco = 16'(n); end
    @(negedge clk) start = 1'b0;
    if (n == 0) begin
      check(!gate && done, "zero load gives an immediate done");
      @(negedge clk);
      check(!done, "done lasts one cycle");
      return;
    end
    check(gate, "gate opens the cycle after start");
    while (gate && waited < 1000) begin
      high++;
      if (done) dones++;
      @(negedge clk);
      waited++;
    end
    check(high == n, $sformatf("gate high %0d cycles, loaded %0d", high, n));
    check(done && dones == 0, "done pulses when the gate closes");
    @(negedge clk);
    check(!done && !gate, "done lasts one cycle");
  endtask

  // assert reset with an edge, so that the asynchronous reset takes effect
  initial #0.5 rst_n = 1'b0;

  initial begin
    void'($urandom(5));
    #12 rst_n = 1'b1;
    check(!gate && !done, "idle after reset");
    run(0);
    run(1);
    run(2);
    for (int i = 0; i < 25; i++) run($urandom_range(0, 300));
    // restart while counting: the new load wins
    @(negedge clk) begin start = 1'b1; n_dco = 16'd50; end
    @(negedge clk) start = 1'b0;
    repeat (10) @(negedge clk);
    run(7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
