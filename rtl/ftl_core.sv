// ftl_core: digital part of the IF frequency tracking loop (frequency detector
// and CBST controller).
//
// The frequency detector is a frequency-counter structure with two counters:
// the control timer, clocked by the system (DCO) clock, opens a window of N_DCO
// clock cycles, and the N_IF counter, clocked by the limited IF signal IF'(t),
// counts IF edges inside that window. The CBST controller, clocked by the
// system clock, sets N_DCO so that the window lasts the same time at every DCO
// code, compares counts taken at the two edges of its search window and drives
// the DCO code C_DCO. The IF counter is reached only through its asynchronous
// clear and gate, so the two clock domains share no synchronous path; the
// controller reads N_IF only after the gate has been closed for a few clocks.
//
// Ports: `clk` is the DCO output, `if_in` is IF'(t). `start` (one cycle) runs a
// search from `c_init`; `locked` then rises with the result on `c_dco`. `stage`,
// `iter`, `dec_valid`/`dec_high`, `acc_gate` and `n_if` show the search's
// progress. The structure follows the published block diagram; widths and
// timing are this implementation's (see ftl_cbst_controller).
module ftl_core
  import ftl_pkg::*;
#(
  parameter int unsigned N_ITER        = 10,
  parameter int unsigned EPS_MAX_Q16   = 1966,
  parameter int unsigned TACC_LSB      = 800000,
  parameter int unsigned COARSE_ITERS  = 3,
  parameter int unsigned FINE1_ITERS   = 4,
  parameter int unsigned L_COARSE_LOG2 = 0,
  parameter int unsigned L_FINE1_LOG2  = 2,
  parameter int unsigned L_FINE2_LOG2  = 4,
  parameter int unsigned SETTLE_CYC    = 16,
  parameter int unsigned READ_WAIT     = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              if_in,
  input  logic              start,
  input  logic [CODE_W-1:0] c_init,
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

  logic              tmr_start, tmr_done, if_clr;
  logic [NDCO_W-1:0] tmr_n_dco;

  ftl_cbst_controller #(
    .N_ITER(N_ITER), .EPS_MAX_Q16(EPS_MAX_Q16), .TACC_LSB(TACC_LSB),
    .COARSE_ITERS(COARSE_ITERS), .FINE1_ITERS(FINE1_ITERS),
    .L_COARSE_LOG2(L_COARSE_LOG2), .L_FINE1_LOG2(L_FINE1_LOG2),
    .L_FINE2_LOG2(L_FINE2_LOG2), .SETTLE_CYC(SETTLE_CYC), .READ_WAIT(READ_WAIT)
  ) u_cbst (
    .clk, .rst_n, .start, .c_init, .c_dco, .busy, .locked, .stage, .iter,
    .dec_valid, .dec_high,
    .tmr_start, .tmr_n_dco, .tmr_done,
    .if_clr, .n_if
  );

  ftl_ctrl_timer #(.W(NDCO_W)) u_timer (
    .clk, .rst_n, .start(tmr_start), .n_dco(tmr_n_dco), .gate(acc_gate), .done(tmr_done)
  );

  ftl_if_counter #(.W(NIF_W)) u_ifcnt (
    .if_clk(if_in), .clr(if_clr), .gate(acc_gate), .n_if(n_if)
  );

endmodule
