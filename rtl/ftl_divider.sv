// ftl_divider: sequential unsigned divider for the search arithmetic.
//
// The DCO frequency is the reciprocal of its code, so every frequency operation
// of the search becomes a division on codes: the median of the window (a
// harmonic mean of the edge codes), the first window edges (code divided by
// 1 +- eps_max) and the number of DCO cycles in a constant time window. One
// divider is shared for all of them; the loop is slow enough that a radix-2
// restoring divider, one quotient bit per clock, costs nothing in tracking time.
//
// `start` (one cycle, ignored while busy) captures `dividend` and `divisor`;
// NW further clock edges later `done` pulses for one cycle and `quotient` and
// `remainder` hold the result until the next start. Division by zero returns
// an all-ones quotient. Rounding, where wanted, is done by the caller adding
// half the divisor to the dividend. Reset is asynchronous, active low.
module ftl_divider #(
  parameter int unsigned NW = 32,  // dividend and quotient width
  parameter int unsigned DW = 17   // divisor and remainder width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NW-1:0] dividend,
  input  logic [DW-1:0] divisor,
  output logic          busy,
  output logic          done,
  output logic [NW-1:0] quotient,
  output logic [DW-1:0] remainder
);

  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned CW = $clog2(NW + 1);

  logic [DW:0]   rem_q;   // partial remainder, always below the divisor
  logic [NW-1:0] quo_q;   // dividend bits still to shift in, quotient bits shifted out
  logic [DW-1:0] div_q;
  logic [CW-1:0] cnt_q;

  logic [DW:0]   shifted;
  logic [DW+1:0] diff;

  always_comb begin
    shifted = {rem_q[DW-1:0], quo_q[NW-1]};
    diff    = {1'b0, shifted} - {2'b00, div_q};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem_q <= '0;
      quo_q <= '0;
      div_q <= '0;
      cnt_q <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          rem_q <= '0;
          quo_q <= dividend;
          div_q <= divisor;
          cnt_q <= CW'(NW);
          busy  <= 1'b1;
        end
      end else begin
        if (!diff[DW+1]) begin
          rem_q <= diff[DW:0];
          quo_q <= {quo_q[NW-2:0], 1'b1};
        end else begin
          rem_q <= shifted;
          quo_q <= {quo_q[NW-2:0], 1'b0};
        end
        cnt_q <= cnt_q - 1'b1;
        if (cnt_q == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign quotient  = quo_q;
  assign remainder = rem_q[DW-1:0];

endmodule
