// ftl_p2_dco: behavioural model of the power-of-two (P2) delay-cell DCO.
//
// This is a simulation model, not synthesizable logic: the real oscillator is a
// ring of hysteresis delay cells whose delays are binary-weighted, so that the
// oscillation period is the control code times one unit delay. The model
// reproduces that law: period = code * T_UNIT_FS femtoseconds, a 50 % duty cycle,
// and a new code taking effect at the next half period. With the default unit
// delay of 10 ps, code 20000 gives the nominal 5 MHz system clock and one code
// step is 50 ppm. Process, voltage and temperature spread is modelled by
// changing T_UNIT_FS. The oscillator is always on, as in the published design;
// codes below MIN_CODE are clamped to keep the model from stalling.
module ftl_p2_dco
  import ftl_pkg::*;
#(
  parameter int unsigned T_UNIT_FS = 10000, // unit delay in fs (10 ps)
  parameter int unsigned MIN_CODE = 16
) (
  input  logic [CODE_W-1:0] code,
  output logic              clk_out
);
  timeunit 1ns;
  timeprecision 1ps;

  real half_ps;

  initial clk_out = 1'b0;

  always begin
    half_ps = 0.0005 * real'(T_UNIT_FS) * real'((int'(code) < int'(MIN_CODE)) ? MIN_CODE : int'(code));
    #(half_ps * 1ps) clk_out = ~clk_out;
  end

endmodule
