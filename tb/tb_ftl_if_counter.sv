// tb_ftl_if_counter: checks the N_IF counter of the frequency detector.
//
// IF' edges arrive at random intervals (2 to 40 ns, independent of any clock)
// while the gate opens and closes at random times. The testbench counts the
// rising edges that find the gate open and compares with the counter after each
// window. It also checks the asynchronous clear (no IF edge needed) and, on a
// 4-bit instance, that the count saturates at all ones instead of wrapping.
module tb_ftl_if_counter;
  timeunit 1ns;
  timeprecision 1ps;

  logic        if_clk = 1'b0, clr = 1'b0, gate = 1'b0;
  logic [15:0] n_if;
  logic [3:0]  n_small;

  ftl_if_counter dut (.if_clk, .clr, .gate, .n_if);
  ftl_if_counter #(.W(4)) dut_sat (.if_clk, .clr, .gate, .n_if(n_small));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int expected = 0;
  bit run_if = 1'b0;

  // IF' source: pulses with random spacing; the model counts gated edges
  // (edges fall on half nanoseconds, the gate moves on whole ones)
  initial begin
    #0.5;
    forever begin
    #($urandom_range(2, 40));
    if (run_if) begin
      if (gate) expected++;
      if_clk = 1'b1;
      #1 if_clk = 1'b0;
    end
    end
  end

  initial begin
    void'($urandom(11));
    #1 clr = 1'b1;
    #4 clr = 1'b0;
    check(n_if == 0, "cleared at start");
    run_if = 1'b1;
    for (int w = 0; w < 40; w++) begin
      // clear, open a window of random length, close, read
      clr = 1'b1; #3 clr = 1'b0;
      check(n_if == 0 && n_small == 0, "asynchronous clear");
      expected = 0;
      #($urandom_range(3, 17)) gate = 1'b1;
      #($urandom_range(20, 600)) gate = 1'b0;
      #50;
      check(int'(n_if) == expected, $sformatf("window %0d: counted %0d, expected %0d", w, n_if, expected));
      check(int'(n_small) == ((expected > 15) ? 15 : expected),
            $sformatf("4-bit counter %0d, expected %0d", n_small, (expected > 15) ? 15 : expected));
      #($urandom_range(10, 100));
      check(int'(n_if) == expected, "count holds while the gate is closed");
    end
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
