// ftl_cbst_controller: comparison-based binary-search tracking (CBST) controller.
//
// The controller searches the DCO code whose frequency, multiplied up to RF,
// matches the received reference. It never looks for the zero of the IF
// frequency directly, because the IF edge count also holds noise glitches.
// Instead it keeps a search window [f_L, f_H] around a median f_M, measures the
// IF count at both window edges over the same time, and keeps the half-window on
// the side with the smaller count (the side nearer the valley of the V-shaped
// count-versus-frequency curve). The glitch bias is the same in both counts and
// cancels in the comparison. After N_ITER halvings the median is the result.
//
// Codes are periods (f_DCO is proportional to 1/C_DCO), so:
//   * window setup: C_H,1 = C_M,1 / (1 + eps_max), C_L,1 = C_M,1 / (1 - eps_max)
//   * new median:   C_M = 2 * C_L * C_H / (C_L + C_H)   (arithmetic mean in f)
//   * timer load:   N_DCO = L * T_ACC / (C_DCO * t_LSB) (constant time window)
// all computed, with rounding to nearest, on one shared sequential divider.
//
// The search passes through three tuning stages (coarse, first fine, second
// fine). Each stage lengthens the window by its own factor L = 2**L*_LOG2,
// because the count difference to resolve shrinks with the window; the stage
// is selected by the iteration number.
//
// One measurement: set C_DCO, compute N_DCO while waiting at least SETTLE_CYC
// clocks for the RF synthesizer to follow the new code, clear the IF counter,
// run the timer, wait READ_WAIT clocks for the last IF edges, then read N_IF.
// The low edge is measured first. The whole search takes about 6600 clocks
// (1.32 ms at 5 MHz) with the default parameters.
//
// Interface: `start` (one cycle, while not busy) begins a search from `c_init`;
// `busy` is high during the search; `locked` rises when it ends and stays until
// the next start, with `c_dco` holding the result. While idle and not locked
// `c_dco` follows `c_init`. `dec_valid` pulses once per iteration with
// `dec_high` = 1 when the high-frequency half was kept. `stage` and `iter`
// show the position in the search.
// Reset is asynchronous, active low; the assertions use it only to disable
// themselves, which is why lint sees it as both synchronous and asynchronous.
//
// From the published design: the window rule, the reciprocal code arithmetic,
// eps_max = 3 %, eps_0 = 50 ppm, N_ITER = ceil(log2(eps_max/eps_0)) = 10 and the
// three stages. This implementation's choices: T_ACC = 8 us, the stage split
// 3/4/3 iterations with L = 1/4/16, the settle and read waits, and keeping the
// low-frequency half when both counts are equal.
module ftl_cbst_controller
  import ftl_pkg::*;
#(
  parameter int unsigned N_ITER       = 10,      // binary-search iterations
  parameter int unsigned EPS_MAX_Q16  = 1966,    // eps_max = 3 % in 2^-16 units
  parameter int unsigned TACC_LSB     = 800000,  // T_ACC = 8 us in 10-ps units
  parameter int unsigned COARSE_ITERS = 3,       // iterations in the coarse stage
  parameter int unsigned FINE1_ITERS  = 4,       // iterations in the first fine stage
  parameter int unsigned L_COARSE_LOG2 = 0,      // L = 1 in the coarse stage
  parameter int unsigned L_FINE1_LOG2  = 2,      // L = 4 in the first fine stage
  parameter int unsigned L_FINE2_LOG2  = 4,      // L = 16 in the second fine stage
  parameter int unsigned SETTLE_CYC   = 16,      // clocks after a code change
  parameter int unsigned READ_WAIT    = 3        // clocks from gate close to read
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [CODE_W-1:0] c_init,      // free-running (self-calibrated) code
  output logic [CODE_W-1:0] c_dco,       // code applied to the DCO
  output logic              busy,
  output logic              locked,
  output tuning_stage_e     stage,
  output logic [3:0]        iter,        // iteration being run, from 0
  output logic              dec_valid,
  output logic              dec_high,
  // control timer
  output logic              tmr_start,
  output logic [NDCO_W-1:0] tmr_n_dco,
  input  logic              tmr_done,
  // IF counter
  output logic              if_clr,
  input  logic [NIF_W-1:0]  n_if
);

  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned DIV_NW = 32;
  localparam int unsigned DIV_DW = 17;
  localparam int unsigned K_HIGH = (1 << SCALE_SH) + EPS_MAX_Q16;  // (1 + eps_max)
  localparam int unsigned K_LOW  = (1 << SCALE_SH) - EPS_MAX_Q16;  // (1 - eps_max)
  localparam int unsigned WAIT_W = $clog2(((SETTLE_CYC > READ_WAIT) ? SETTLE_CYC : READ_WAIT) + 1) + 1;

  typedef enum logic [3:0] {
    S_IDLE,
    S_INIT_H,    // C_H,1 = C_M,1 / (1 + eps_max)
    S_INIT_L,    // C_L,1 = C_M,1 / (1 - eps_max)
    S_NDCO,      // N_DCO for the edge being measured
    S_SETTLE,
    S_CLEAR,
    S_COUNT,
    S_READ,
    S_DECIDE,
    S_MEDIAN,    // C_M = 2 C_L C_H / (C_L + C_H)
    S_DONE
  } state_e;

  state_e             state;
  logic               div_pending;  // divider started, result not yet taken
  logic               meas_high;    // measuring the high-frequency edge
  logic [CODE_W-1:0]  c_l, c_h, c_m;
  logic [NIF_W-1:0]   n_l, n_h;
  logic [WAIT_W-1:0]  wait_cnt;

  // Shared divider
  logic               div_start, div_busy, div_done;
  logic [DIV_NW-1:0]  div_a, div_q;
  logic [DIV_DW-1:0]  div_b, div_r;

  ftl_divider #(.NW(DIV_NW), .DW(DIV_DW)) u_div (
    .clk, .rst_n,
    .start(div_start), .dividend(div_a), .divisor(div_b),
    .busy(div_busy), .done(div_done), .quotient(div_q), .remainder(div_r)
  );

  // Stage and window length factor from the iteration number
  logic [2:0] l_log2;
  always_comb begin
    if (32'(iter) < COARSE_ITERS) begin
      stage  = STG_COARSE;
      l_log2 = 3'(L_COARSE_LOG2);
    end else if (32'(iter) < COARSE_ITERS + FINE1_ITERS) begin
      stage  = STG_FINE1;
      l_log2 = 3'(L_FINE1_LOG2);
    end else begin
      stage  = STG_FINE2;
      l_log2 = 3'(L_FINE2_LOG2);
    end
  end

  // Divider operands for each computing state
  logic [CODE_W-1:0] c_meas;
  logic [DIV_DW-1:0] c_sum;
  logic [2*CODE_W:0] c_prod2;
  assign c_meas  = meas_high ? c_h : c_l;
  assign c_sum   = DIV_DW'(c_l) + DIV_DW'(c_h);
  assign c_prod2 = ((2*CODE_W+1)'(c_l) * (2*CODE_W+1)'(c_h)) << 1;

  always_comb begin
    div_a = '0;
    div_b = '0;
    unique case (state)
      S_INIT_H: begin
        div_a = ({17'd0, c_m} << SCALE_SH) + DIV_NW'(K_HIGH / 2);
        div_b = DIV_DW'(K_HIGH);
      end
      S_INIT_L: begin
        div_a = ({17'd0, c_m} << SCALE_SH) + DIV_NW'(K_LOW / 2);
        div_b = DIV_DW'(K_LOW);
      end
      S_NDCO: begin
        div_a = (DIV_NW'(TACC_LSB) << l_log2) + DIV_NW'(c_meas >> 1);
        div_b = DIV_DW'(c_meas);
      end
      S_MEDIAN: begin
        div_a = DIV_NW'(c_prod2) + DIV_NW'(c_sum >> 1);
        div_b = c_sum;
      end
      default: ;
    endcase
  end

  assign div_start = !div_pending && !div_busy &&
                     (state inside {S_INIT_H, S_INIT_L, S_NDCO, S_MEDIAN});

  // Quotient clipped to the code width and to the timer width
  logic [CODE_W-1:0] q_code;
  logic [NDCO_W-1:0] q_ndco;
  assign q_code = (div_q > DIV_NW'({CODE_W{1'b1}})) ? '1 : div_q[CODE_W-1:0];
  assign q_ndco = (div_q > DIV_NW'({NDCO_W{1'b1}})) ? '1 : div_q[NDCO_W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      div_pending <= 1'b0;
      meas_high   <= 1'b0;
      c_l         <= '0;
      c_h         <= '0;
      c_m         <= '0;
      n_l         <= '0;
      n_h         <= '0;
      wait_cnt    <= '0;
      iter        <= '0;
      c_dco       <= CODE_W'(C_NOM);
      locked      <= 1'b0;
      tmr_start   <= 1'b0;
      tmr_n_dco   <= '0;
      if_clr      <= 1'b1;
      dec_valid   <= 1'b0;
      dec_high    <= 1'b0;
    end else begin
      tmr_start <= 1'b0;
      dec_valid <= 1'b0;
      if (div_start) div_pending <= 1'b1;
      if (div_done)  div_pending <= 1'b0;

      unique case (state)
        S_IDLE: begin
          if (!locked) c_dco <= c_init;
          if (start) begin
            c_m    <= c_init;
            c_dco  <= c_init;
            iter   <= '0;
            locked <= 1'b0;
            state  <= S_INIT_H;
          end
        end

        S_INIT_H: if (div_done) begin
          c_h   <= q_code;
          state <= S_INIT_L;
        end

        S_INIT_L: if (div_done) begin
          c_l       <= q_code;
          c_dco     <= q_code;
          meas_high <= 1'b0;
          wait_cnt  <= WAIT_W'(SETTLE_CYC);
          state     <= S_NDCO;
        end

        // the settle time runs while N_DCO is being divided out
        S_NDCO: begin
          if (wait_cnt != '0) wait_cnt <= wait_cnt - 1'b1;
          if (div_done) begin
            tmr_n_dco <= q_ndco;
            state     <= S_SETTLE;
          end
        end

        S_SETTLE: begin
          if (wait_cnt == '0) begin
            if_clr <= 1'b1;
            state  <= S_CLEAR;
          end else begin
            wait_cnt <= wait_cnt - 1'b1;
          end
        end

        S_CLEAR: begin
          if_clr    <= 1'b0;
          tmr_start <= 1'b1;
          state     <= S_COUNT;
        end

        S_COUNT: if (tmr_done) begin
          wait_cnt <= WAIT_W'(READ_WAIT);
          state    <= S_READ;
        end

        S_READ: begin
          if (wait_cnt != '0) begin
            wait_cnt <= wait_cnt - 1'b1;
          end else if (!meas_high) begin
            n_l       <= n_if;
            meas_high <= 1'b1;
            c_dco     <= c_h;
            wait_cnt  <= WAIT_W'(SETTLE_CYC);
            state     <= S_NDCO;
          end else begin
            n_h   <= n_if;
            state <= S_DECIDE;
          end
        end

        S_DECIDE: begin
          // keep the half-window on the side with the smaller IF count
          dec_valid <= 1'b1;
          if (n_h < n_l) begin
            c_l      <= c_m;
            dec_high <= 1'b1;
          end else begin
            c_h      <= c_m;
            dec_high <= 1'b0;
          end
          state <= S_MEDIAN;
        end

        S_MEDIAN: if (div_done) begin
          c_m <= q_code;
          if (32'(iter) == N_ITER - 1) begin
            c_dco  <= q_code;
            locked <= 1'b1;
            state  <= S_DONE;
          end else begin
            iter      <= iter + 1'b1;
            c_dco     <= c_l;
            meas_high <= 1'b0;
            wait_cnt  <= WAIT_W'(SETTLE_CYC);
            state     <= S_NDCO;
          end
        end

        S_DONE: state <= S_IDLE;

        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE) && (state != S_DONE);

  // The timer is only started from the clear state, after the counter was cleared.
  a_start_after_clear: assert property (@(posedge clk) disable iff (!rst_n)
    tmr_start |-> $past(state == S_CLEAR));
  // A decision is only taken with both counts of the iteration measured.
  a_one_decision: assert property (@(posedge clk) disable iff (!rst_n)
    dec_valid |-> !$past(dec_valid));

endmodule
