// tb_ftl_p2_dco: checks the DCO model's frequency law, period = code * 10 ps,
// by timing rising edges of its output for several codes across the +-3 %
// range and at the extremes, and that a code change takes effect within one
// period.
module tb_ftl_p2_dco;
  import ftl_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  logic [CODE_W-1:0] code = CODE_W'(20000);
  logic              clk_out;

  ftl_p2_dco dut (.code, .clk_out);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic measure(input int c);
    realtime t1, t2;
    real want;
    code = CODE_W'(c);
    repeat (2) @(posedge clk_out);   // let the new code take effect
    t1 = $realtime;
    repeat (10) @(posedge clk_out);
    t2 = $realtime;
    want = real'(c) * 0.01;
    check((t2 - t1) / 10.0 - want < 0.002 && want - (t2 - t1) / 10.0 < 0.002,
          $sformatf("code %0d: period %0.4f ns, expected %0.4f ns", c, (t2 - t1) / 10.0, want));
  endtask

  initial begin
    measure(20000);
    measure(19400);
    measure(20619);
    measure(20001);
    measure(1000);
    measure(32767);
    for (int i = 0; i < 10; i++) measure($urandom_range(19000, 21000));
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
