// ftl_top: IF frequency tracking loop of a crystal-less wireless sensor node.
//
// A sensor node without a quartz crystal runs on an on-chip DCO that is only
// accurate to a few percent. The node's RF receiver mixes a sinusoidal
// reference broadcast by the central node down with a local oscillator at
// N_SYN times the DCO frequency, so the intermediate frequency is proportional
// to the DCO's frequency error. This block closes the loop: the DCO model
// clocks the digital core, and the core searches the DCO code that minimises
// the IF, bringing the clock from +-3 % to within +-50 ppm.
//
// Outside this block (and brought in as ports): the RF front end and the
// limiting comparator that make IF'(t) from the received signal (`if_in`), and
// the DCO self-calibration that provides the free-running code `c_init`.
// `sys_clk` is the calibrated system clock. All other outputs are as on
// ftl_core. The DCO is a behavioural model, so this top is for simulation; the
// synthesizable part is ftl_core.
module ftl_top
  import ftl_pkg::*;
(
  input  logic              rst_n,
  input  logic              if_in,
  input  logic              start,
  input  logic [CODE_W-1:0] c_init,
  output logic              sys_clk,
  output logic [CODE_W-1:0] c_dco,
  output logic              busy,
  output logic              locked,
  output tuning_stage_e     stage,
  output logic [3:0]        iter,
  output logic              dec_valid,
  output logic              dec_high,
  output logic              acc_gate,
  output logic [NIF_W-1:0]  n_if
);

  timeunit 1ns;
  timeprecision 1ps;

  ftl_p2_dco u_dco (
    .code(c_dco), .clk_out(sys_clk)
  );

  ftl_core u_core (
    .clk(sys_clk), .rst_n, .if_in, .start, .c_init, .c_dco, .busy, .locked,
    .stage, .iter, .dec_valid, .dec_high, .acc_gate, .n_if
  );

endmodule
