// ftl_pkg: types and constants shared by the IF frequency tracking loop (IF-FTL).
//
// The loop calibrates an on-chip digitally controlled oscillator (DCO) against a
// wireless RF reference. The DCO period is set by the control code C_DCO in steps
// of one unit delay (10 ps), so the nominal 5 MHz system clock (200 ns) sits at
// code 20000 and one code step is 50 ppm of frequency. The initial tolerance
// (3 %) and the final accuracy (50 ppm) follow the published design; the widths
// below are this implementation's choice, sized to hold those numbers.
package ftl_pkg;

  timeunit 1ns;
  timeprecision 1ps;

  // Width of the DCO control code: 20000 +- 3 % fits in 15 bits.
  localparam int unsigned CODE_W = 15;
  // Width of the IF edge count N_IF and the timer load N_DCO.
  localparam int unsigned NIF_W  = 16;
  localparam int unsigned NDCO_W = 16;

  // Unit delay of the DCO in picoseconds and the nominal code of 5 MHz.
  localparam int unsigned T_LSB_PS = 10;
  localparam int unsigned C_NOM    = 20000;

  // Fixed-point scale used for the frequency scaling factors (1 +- eps_max).
  localparam int unsigned SCALE_SH = 16;

  // The three DCO tuning stages the binary search passes through.
  typedef enum logic [1:0] {
    STG_COARSE = 2'd0,
    STG_FINE1  = 2'd1,
    STG_FINE2  = 2'd2
  } tuning_stage_e;

endpackage
