// ftl_if_counter: the N_IF counter of the frequency detector.
//
// Counts rising edges of IF'(t), the limited intermediate-frequency signal. Each
// edge is either a true IF period or a noise glitch that passed the limiter; the
// counter cannot tell them apart, and the search that uses it does not need to,
// because it only compares two counts that carry the same glitch bias.
//
// The counter is clocked by IF'(t) itself, so it lives in its own clock domain.
// The controller reaches it only through two asynchronous controls, as in the
// published block diagram: `clr` clears it asynchronously (active high) and
// `gate` enables counting. `gate` is a level driven from the system clock
// domain and held for the whole accumulation window; an IF' edge that meets its
// transition may or may not be counted, an error of one count that is of the
// same kind as a glitch. The count saturates at all ones. The controller reads
// `n_if` a few system clocks after closing the gate, when it no longer changes.
module ftl_if_counter #(
  parameter int unsigned W = ftl_pkg::NIF_W
) (
  input  logic         if_clk,  // IF'(t) from the limiting comparator
  input  logic         clr,     // asynchronous clear, active high
  input  logic         gate,    // count enable (accumulation window open)
  output logic [W-1:0] n_if     // edges counted since the last clear
);

  timeunit 1ns;
  timeprecision 1ps;

  always_ff @(posedge if_clk or posedge clr) begin
    if (clr)                      n_if <= '0;
    else if (gate && n_if != '1)  n_if <= n_if + 1'b1;
  end

endmodule
