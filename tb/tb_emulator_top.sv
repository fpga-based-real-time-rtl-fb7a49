// tb_emulator_top: end-to-end run of the whole emulator at its default sizes (25 ns clock,
// 2.5 us integration interval, 125 us PWM period).
//   1. Standstill with the rotor at ROTOR_DEG, zero current reference and test injection on:
//      the position estimate must settle within TOL_DEG of the rotor angle (modulo 180 deg)
//      and the motor currents must stay small; every estimate of the last 10 PWM periods
//      at 0 deg must be within 0.5 deg (the error the published results report for this
//      start-up case); the estimate is re-checked after the rotor
//      angle is moved to ROTOR2_DEG and then ROTOR3_DEG.
//   1b. The rotor then turns slowly (0.005 deg per 2.5 us interval, 34.9 rad/s electrical)
//      for 40 PWM periods: the estimate must follow the angle, the estimated speed,
//      averaged over the last 30 periods, must be within 20% of the true speed, and the
//      controller then runs with a non-zero decoupling speed.
//   2. A large q-current step drives the PI output into its limit (anti-windup); the
//      measured q current must then approach the reference.
//   3. The encoder is turned one detent up and one down on gain Kp_q.
// It counts each mechanism (test pairs I and II, estimates, PI runs, PI limiting, gain steps
// up and down, dead times on the gate outputs, PI runs with decoupling) and fails if one
// never happened.
module tb_emulator_top;
  import pmsm_pkg::*;
  localparam real ROTOR_DEG = 0.0, ROTOR2_DEG = 20.0, ROTOR3_DEG = -35.0, TOL_DEG = 3.0;
  localparam int PERIOD = 2 * HALF_CYCLES;

  logic clk = 0, rst_n = 0;
  angle_t theta_r;
  logic signed [17:0] omega_dt;
  sample_t iq_ref, id_ref;
  logic test_en, enc_a, enc_b;
  logic [1:0] gain_sel;
  logic [2:0] gate_hi, gate_lo;
  abc_t i_abc, v_ref;
  qd_t i_qd;
  angle_t theta_est;
  logic est_valid, pi_done, pi_limited;
  logic signed [17:0] omega_est;
  bit     w_gather = 0;
  longint w_sum = 0;
  int     w_n = 0, n_dec = 0;
  bit     e_gather = 0;
  real    e_max = 0.0;
  int     e_n = 0;
  logic [7:0] gain_count [4];
  int checks = 0, failures = 0;

  emulator_top dut (.clk, .rst_n, .theta_r, .omega_dt, .iq_ref, .id_ref, .test_en, .enc_a,
                    .enc_b, .gain_sel, .gate_hi, .gate_lo, .i_abc, .i_qd, .v_ref, .theta_est,
                    .est_valid, .omega_est, .pi_done, .pi_limited, .gain_count);

  always #12.5 clk = ~clk;   // 40 MHz

  initial begin
    #400ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_test_i = 0, n_test_ii = 0, n_est = 0, n_pi = 0, n_lim = 0, n_up = 0, n_dn = 0, n_dead = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_test.done_pulse && dut.u_test.pair_en && !dut.u_test.pair_sel) n_test_i++;
    if (dut.u_test.done_pulse && dut.u_test.pair_en &&  dut.u_test.pair_sel) n_test_ii++;
    if (est_valid) n_est++;
    if (est_valid && w_gather) begin w_sum += longint'(omega_est); w_n++; end
    if (pi_done && omega_est != 0) n_dec++;
    if (est_valid && e_gather) begin
      real d;
      d = deg(theta_est);
      while (d >= 90.0) d -= 180.0;
      if (d < 0.0) d = -d;
      if (d > e_max) e_max = d;
      e_n++;
    end
    if (pi_done) begin n_pi++; if (pi_limited) n_lim++; end
    if (dut.u_tune.step_up) n_up++;
    if (dut.u_tune.step_dn) n_dn++;
    if ((gate_hi | gate_lo) != 3'b111) n_dead++;
  end

  function automatic real deg(input angle_t a);
    return real'(a) * 360.0 / 262144.0;
  endfunction

  function automatic angle_t to_ang(input real d);
    return angle_t'($rtoi(d / 360.0 * 262144.0));
  endfunction

  task automatic check_est(input real rotor, input string what);
    real d;
    d = deg(theta_est) - rotor;
    while (d > 90.0) d -= 180.0;
    while (d < -90.0) d += 180.0;
    checks++;
    $display("%s: rotor %f deg, estimate %f deg", what, rotor, deg(theta_est));
    if (d > TOL_DEG || d < -TOL_DEG) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic encoder_edge(input bit is_a, input bit lvl);
    if (is_a) enc_a = lvl; else enc_b = lvl;
    repeat (45000) @(negedge clk);
  endtask

  initial begin
    theta_r = to_ang(ROTOR_DEG); omega_dt = '0; iq_ref = '0; id_ref = '0;
    test_en = 1; enc_a = 0; enc_b = 0; gain_sel = 2'd0;
    repeat (5) @(negedge clk);
    rst_n = 1;
    // 1. standstill estimation
    repeat (20 * PERIOD) @(negedge clk);
    e_gather = 1;
    repeat (10 * PERIOD) @(negedge clk);
    e_gather = 0;
    check_est(ROTOR_DEG, "standstill estimate");
    checks++;
    $display("largest standstill error over %0d estimates: %f deg", e_n, e_max);
    if (e_n == 0 || e_max > 0.5) begin failures++; $display("FAIL standstill error above 0.5 deg"); end
    checks++;
    if (i_qd.q > 800 || i_qd.q < -800 || i_qd.d > 800 || i_qd.d < -800) begin
      failures++; $display("FAIL currents not small: %0d %0d", i_qd.q, i_qd.d);
    end
    theta_r = to_ang(ROTOR2_DEG);
    repeat (30 * PERIOD) @(negedge clk);
    check_est(ROTOR2_DEG, "second rotor angle");
    theta_r = to_ang(ROTOR3_DEG);
    repeat (30 * PERIOD) @(negedge clk);
    check_est(ROTOR3_DEG, "third rotor angle");
    // 1b. slow rotation
    begin
      real rot, w_true;
      rot = ROTOR3_DEG;
      w_true = 0.005 * 3.14159265358979 / 180.0 * 16777216.0;
      omega_dt = 18'($rtoi(w_true));
      for (int p = 0; p < 40 * 50; p++) begin
        repeat (FRAME_CYCLES) @(negedge clk);
        rot += 0.005;
        theta_r = to_ang(rot);
        if (p == 10 * 50) w_gather = 1;
      end
      w_gather = 0;
      check_est(rot, "turning rotor");
      checks++;
      $display("estimated speed %f, true %f (speed * 2.5 us * 2^24), %0d estimates",
               real'(w_sum) / real'(w_n), w_true, w_n);
      if (w_n == 0 || real'(w_sum) / real'(w_n) < 0.8 * w_true ||
          real'(w_sum) / real'(w_n) > 1.2 * w_true) begin
        failures++; $display("FAIL speed estimate");
      end
      omega_dt = '0;
    end
    // 2. current step into the voltage limit
    iq_ref = sample_t'(2 * 8192);
    repeat (60 * PERIOD) @(negedge clk);
    $display("q current %f pu for reference 2.0 pu", real'(i_qd.q) / 8192.0);
    checks++;
    if (i_qd.q < 8192) begin failures++; $display("FAIL q current does not follow"); end
    iq_ref = '0;
    // 3. encoder: one detent up, one down on Kp_q
    encoder_edge(1, 1); encoder_edge(0, 1); encoder_edge(1, 0); encoder_edge(0, 0);
    checks++;
    if (gain_count[0] != 8'd48) begin failures++; $display("FAIL gain up %0d", gain_count[0]); end
    encoder_edge(0, 1); encoder_edge(1, 1); encoder_edge(0, 0); encoder_edge(1, 0);
    checks++;
    if (gain_count[0] != 8'd47) begin failures++; $display("FAIL gain down %0d", gain_count[0]); end
    $display("test pairs I=%0d II=%0d estimates=%0d PI runs=%0d limited=%0d decoupled=%0d gain up=%0d down=%0d dead-time clocks=%0d",
             n_test_i, n_test_ii, n_est, n_pi, n_lim, n_dec, n_up, n_dn, n_dead);
    checks += 9;
    if (n_dec == 0)     begin failures++; $display("FAIL no decoupled PI run"); end
    if (n_test_i == 0)  begin failures++; $display("FAIL no test pair I"); end
    if (n_test_ii == 0) begin failures++; $display("FAIL no test pair II"); end
    if (n_est == 0)     begin failures++; $display("FAIL no estimate"); end
    if (n_pi == 0)      begin failures++; $display("FAIL no PI run"); end
    if (n_lim == 0)     begin failures++; $display("FAIL PI never limited"); end
    if (n_up == 0)      begin failures++; $display("FAIL no gain step up"); end
    if (n_dn == 0)      begin failures++; $display("FAIL no gain step down"); end
    if (n_dead == 0)    begin failures++; $display("FAIL no dead time"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
