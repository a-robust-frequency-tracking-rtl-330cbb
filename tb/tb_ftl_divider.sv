// tb_ftl_divider: checks the sequential divider against the simulator's own
// integer division on random operands, on the operand shapes the search uses
// (harmonic mean, window scaling, timer load), and on division by zero. The
// result must come exactly NW + 1 = 33 clocks after the edge that samples start.
module tb_ftl_divider;
  timeunit 1ns;
  timeprecision 1ps;

  logic        clk = 1'b0, rst_n = 1'b1, start = 1'b0;
  logic [31:0] dividend = '0, quotient;
  logic [16:0] divisor = '0, remainder;
  logic        busy, done;

  ftl_divider dut (.clk, .rst_n, .start, .dividend, .divisor, .busy, .done, .quotient, .remainder);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic divide(input logic [31:0] a, input logic [16:0] b);
    int cycles = 0;
    longint unsigned q, r;
    @(negedge clk) begin start = 1'b1; dividend = a; divisor = b; end
    @(negedge clk) begin start = 1'b0; dividend = '0; divisor = '0; end
    cycles = 1;
    while (!done && cycles < 100) begin @(negedge clk); cycles++; end
    if (b == 0) begin
      q = 64'hFFFF_FFFF;
    end else begin
      q = longint'(a) / longint'(b);
      r = longint'(a) % longint'(b);
      check(longint'(remainder) == r, $sformatf("%0d %% %0d: remainder %0d, expected %0d", a, b, remainder, r));
    end
    check(longint'(quotient) == q, $sformatf("%0d / %0d: quotient %0d, expected %0d", a, b, quotient, q));
    check(cycles == 33, $sformatf("latency %0d cycles, expected 33", cycles));
  endtask

  // assert reset with an edge, so that the asynchronous reset takes effect
  initial #0.5 rst_n = 1'b0;

  initial begin
    void'($urandom(3));
    #12 rst_n = 1'b1;
    divide(32'd100, 17'd7);
    divide(32'd0, 17'd5);
    divide(32'hFFFF_FFFF, 17'h1FFFF);
    divide(32'hFFFF_FFFF, 17'd1);
    divide(32'd12345, 17'd0);
    divide(32'd800000 + 32'd10000, 17'd20000);                   // timer load
    divide((32'd20000 << 16) + 32'd33751, 17'd67502);            // C / (1 + 0.03)
    divide(32'd2 * 32'd20619 * 32'd20000 + 32'd20309, 17'd40619); // harmonic mean
    for (int i = 0; i < 60; i++) divide($urandom, 17'($urandom_range(1, 131071)));
    for (int i = 0; i < 20; i++) divide($urandom, 17'($urandom_range(1, 300)));
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
