// tb_ftl_snr_sweep: convergence of the closed loop against channel noise.
//
// The loop's noise analysis models glitches on IF'(t) as Bernoulli trials, one
// every T_D, each succeeding with probability
//   P(E_G) = mean over one IF period of Q((V_TH + |s(n)|) / sigma_w),
// where s is the unit sine, V_TH the limiter threshold and sigma_w the noise
// deviation. This testbench evaluates that formula for SNR = 3, 5, 7, 11 and
// 15 dB (sigma_w^2 = 0.5 / 10^(SNR/10), V_TH = 0.3 of the amplitude), injects
// glitches at that probability, and runs four searches per SNR at the
// default parameters of ftl_top. T_D is this testbench's assumption: 2.5 us,
// the resolution of a limiter behind roughly 200 kHz of IF noise bandwidth.
// Q() uses the Abramowitz-Stegun erfc approximation (error below 2e-7).
//
// Every search must lock with ten decisions. At SNR >= 7 dB the residual error
// must stay within +-100 ppm, the accuracy a 4.85 Mb/s link needs; below that
// the residuals are reported only. The table printed at the end gives, per
// SNR, the glitch probability, the glitch rate and the worst residual error.
module tb_ftl_snr_sweep;
  import ftl_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  localparam real N_SYN   = 87.0;
  localparam real STEP_NS = 5.0;
  localparam real TD_NS   = 2500.0;
  localparam real V_TH    = 0.3;
  localparam real PI      = 3.14159265358979;

  logic              rst_n = 1'b1;
  logic              if_in;
  logic              start = 1'b0;
  logic [CODE_W-1:0] c_init = CODE_W'(20000);
  logic              sys_clk;
  logic [CODE_W-1:0] c_dco;
  logic              busy, locked, dec_valid, dec_high, acc_gate;
  tuning_stage_e     stage;
  logic [3:0]        iter;
  logic [NIF_W-1:0]  n_if;

  ftl_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // right-tail probability of the standard normal distribution
  function automatic real q_func(input real x);
    real z, t, erfc_v;
    z = x / $sqrt(2.0);
    t = 1.0 / (1.0 + 0.3275911 * z);
    erfc_v = t * (0.254829592 + t * (-0.284496736 + t * (1.421413741 +
             t * (-1.453152027 + t * 1.061405429)))) * $exp(-z * z);
    return 0.5 * erfc_v;
  endfunction

  function automatic real glitch_prob(input real snr_db);
    real sigma, acc;
    sigma = $sqrt(0.5 / $pow(10.0, snr_db / 10.0));
    acc = 0.0;
    for (int k = 0; k < 1000; k++) begin
      real s;
      s = $sin(2.0 * PI * real'(k) / 1000.0);
      if (s < 0.0) s = -s;
      acc += q_func((V_TH + s) / sigma);
    end
    return acc / 1000.0;
  endfunction

  // RF front end and limiter model (as in tb_ftl_top)
  real  c_target = 20000.0;
  real  phase = 0.0;
  real  p_glitch = 0.0;
  logic if_sq = 1'b0, glitch = 1'b0;
  assign if_in = if_sq ^ glitch;

  always begin
    real f_if;
    #(STEP_NS);
    f_if = N_SYN * (1.0e11 / c_target - 1.0e11 / real'(c_dco));
    if (f_if < 0.0) f_if = -f_if;
    phase = phase + 2.0 * f_if * STEP_NS * 1.0e-9;
    if (phase >= 1.0) begin phase = phase - 1.0; if_sq = ~if_sq; end
  end

  // Bernoulli glitch trials, at a random offset inside each T_D slot
  always begin
    int unsigned off;
    off = $urandom_range(0, int'(TD_NS) - 10);
    #(real'(off));
    if (real'($urandom_range(0, 999999)) < p_glitch * 1.0e6) begin
      glitch = 1'b1;
      #2 glitch = 1'b0;
    end
    #(TD_NS - real'(off) - 2.0);
  end

  int n_dec = 0;
  always @(posedge sys_clk) if (dec_valid) n_dec++;

  task automatic search(input real target, output real ppm);
    int dec0;
    c_target = target;
    dec0 = n_dec;
    @(negedge sys_clk) start = 1'b1;
    @(negedge sys_clk) start = 1'b0;
    wait (locked);
    ppm = (target / real'(c_dco) - 1.0) * 1.0e6;
    check(n_dec - dec0 == 10, "ten decisions per search");
    repeat (5) @(posedge sys_clk);
  endtask

  real snrs[5] = '{3.0, 5.0, 7.0, 11.0, 15.0};
  real targets[4] = '{20412.7, 19688.3, 20101.55, 19901.2};

  initial #0.5 rst_n = 1'b0;

  initial begin
    real ppm, worst;
    string table_s = "";
    void'($urandom(17));
    #1000 rst_n = 1'b1;
    repeat (5) @(posedge sys_clk);
    foreach (snrs[i]) begin
      p_glitch = glitch_prob(snrs[i]);
      worst = 0.0;
      foreach (targets[j]) begin
        search(targets[j], ppm);
        if (ppm < 0.0) ppm = -ppm;
        if (ppm > worst) worst = ppm;
        if (snrs[i] >= 7.0)
          check(ppm <= 100.0, $sformatf("SNR %0.0f dB, target %0.2f: residual %0.1f ppm", snrs[i], targets[j], ppm));
      end
      table_s = {table_s, $sformatf("  SNR %4.1f dB  P(E_G) %8.5f  glitch rate %7.1f kHz  worst residual %6.1f ppm\n",
                 snrs[i], p_glitch, p_glitch / TD_NS * 1.0e6, worst)};
    end
    check(glitch_prob(7.0) > 0.015 && glitch_prob(7.0) < 0.022, "P(E_G) at 7 dB near 0.0188");
    $write("%s", table_s);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #60ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
