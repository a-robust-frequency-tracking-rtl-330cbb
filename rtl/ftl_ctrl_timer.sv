// ftl_ctrl_timer: the control timer that sets the accumulation window T_ACC.
//
// The frequency detector needs an IF count over a fixed time T_ACC, but the only
// time base on chip is the DCO clock whose frequency the loop is changing. The
// controller therefore loads the number of DCO cycles N_DCO that make up T_ACC
// at the present code, and this timer counts them down.
//
// A one-cycle `start` loads `n_dco`; `gate` rises on the next clock edge and
// stays high for exactly `n_dco` clock cycles; `done` pulses for one cycle on
// the edge where `gate` falls. A load of zero gives no gate and an immediate
// `done`. A `start` while busy restarts the window. Reset is asynchronous,
// active low. Counting down from the load is this implementation's choice.
module ftl_ctrl_timer #(
  parameter int unsigned W = ftl_pkg::NDCO_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] n_dco,
  output logic         gate,
  output logic         done
);

  timeunit 1ns;
  timeprecision 1ps;

  logic [W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      gate <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        cnt  <= n_dco;
        gate <= (n_dco != '0);
        done <= (n_dco == '0);
      end else if (gate) begin
        cnt <= cnt - 1'b1;
        if (cnt == W'(1)) begin
          gate <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
