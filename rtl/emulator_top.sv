// emulator_top: hardware-in-the-loop emulator of a sensorless IPMSM drive at standstill.
//
// Everything of the drive runs on one chip and one 40 MHz (25 ns) clock: the motor model, the
// inverter, the PWM, the current measurement, the PI current controller, the test-signal
// injection and the position estimator, as in the paper's emulator. Data flow:
//
//   PI (q,d) --ICT2(theta_est)--> + test vector (ICT3) --> pwm_asym --> leg states
//   leg states --> gate_drive --> gate_hi/gate_lo  (outputs)
//   leg states --> voltage_modulator --> v_abc --CT1(theta_r)--> pmsm_model --ICT1--> i_abc
//   i_abc --> current_meas --> mid-period sample --CT2(theta_est)--> PI
//                          --> test responses --CT3/CT4--> position_estimator --> theta_est
//   theta_est --> CT2/ICT2;  omega_est --> PI (decoupling feed-forward)
//
// All seven Park / inverse Park transformations share one CORDIC sine/cosine block and one
// multiplier block (shared_transform), which runs once every 2.5 us integration interval,
// right after the voltage modulator delivers the interval's average voltage; at the end of
// each run the motor model takes one forward-Euler step. The PWM period is 125 us, i.e.
// 50 integration intervals. The controller runs once per PWM period, on the first
// transformation run after the mid-period current sample, and its new voltage takes effect
// at the next mid-period boundary, so that both halves of a test pair see the same controller
// voltage. The estimator runs once every two PWM periods (one test pair I and one test pair
// II). The PI gains come from the rotary-encoder tuner; the current references, the true
// rotor angle and speed of the emulated motor are inputs.
//
// The order of the seven transformations in the shared unit follows the paper; which
// drive signal each one carries, the interval-level schedule above and all number formats are
// this design's choices. Quantities are Q4.13 per-unit (10 A, 100 V), angles 18-bit binary.
module emulator_top
  import pmsm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // emulated motor
  input  angle_t      theta_r,       // rotor q-axis angle
  input  logic signed [17:0] omega_dt, // electrical speed times 2.5 us, 24 fraction bits
  // controller set-points and tuning
  input  sample_t     iq_ref,
  input  sample_t     id_ref,
  input  logic        test_en,
  input  logic        enc_a,
  input  logic        enc_b,
  input  logic [1:0]  gain_sel,
  // inverter gate commands
  output logic [2:0]  gate_hi,
  output logic [2:0]  gate_lo,
  // observation
  output abc_t        i_abc,
  output qd_t         i_qd,
  output abc_t        v_ref,
  output angle_t      theta_est,
  output logic        est_valid,
  output logic signed [17:0] omega_est, // estimated speed times 2.5 us, 24 fraction bits
  output logic        pi_done,
  output logic        pi_limited,
  output logic [7:0]  gain_count [4]
);

  // ---------------- integration-interval time base ----------------------------------------
  localparam int FCW = $clog2(FRAME_CYCLES);
  logic [FCW-1:0] fcnt;
  logic           frame_end;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         fcnt <= '0;
    else if (frame_end) fcnt <= '0;
    else                fcnt <= fcnt + 1'b1;
  end
  assign frame_end = (fcnt == FCW'(FRAME_CYCLES - 1));

  // ---------------- PWM, gate drive, inverter ----------------------------------------------
  logic [2:0] leg;
  logic       second_half, mid_pulse, valley_pulse;

  pwm_asym u_pwm (
    .clk, .rst_n, .v_ref, .leg, .second_half, .mid_pulse, .valley_pulse
  );

  gate_drive u_gate (.clk, .rst_n, .leg, .gate_hi, .gate_lo);

  abc_t v_abc;
  logic v_valid;

  voltage_modulator u_vmod (
    .clk, .rst_n, .leg, .frame_end, .v_abc, .valid(v_valid)
  );

  // ---------------- shared Park / inverse Park unit ----------------------------------------
  abc_t   ct_x   [4];
  angle_t ct_th  [4];
  qd_t    ict_x  [3];
  angle_t ict_th [3];
  qd_t    ct_y   [4];
  abc_t   ict_y  [3];
  logic   tr_busy, tr_done, tr_start;

  assign tr_start = v_valid;

  shared_transform u_tr (
    .clk, .rst_n, .start(tr_start), .ct_x, .ct_th, .ict_x, .ict_th,
    .ct_y, .ict_y, .busy(tr_busy), .done(tr_done)
  );

  // ---------------- motor model ------------------------------------------------------------
  pmsm_model u_motor (
    .clk, .rst_n, .en(tr_done), .v(ct_y[0]), .omega_dt, .i(i_qd)
  );
  assign i_abc = ict_y[0];

  // ---------------- current measurement ----------------------------------------------------
  abc_t i_mid, d2;
  logic d2_ok, mid_valid;

  current_meas u_meas (
    .clk, .rst_n, .boundary(mid_pulse | valley_pulse), .at_mid(mid_pulse),
    .i_abc, .i_mid, .d2, .d2_ok, .mid_valid
  );

  // ---------------- test signals -----------------------------------------------------------
  angle_t tst_th, th_i, th_ii;
  qd_t    tst_dv;
  logic   tst_done, tst_sel, tst_valid;

  test_signal_gen u_test (
    .clk, .rst_n, .en(test_en), .second_half, .mid_pulse,
    .th_o(tst_th), .dv_o(tst_dv), .th_i, .th_ii,
    .done_pulse(tst_done), .done_sel(tst_sel), .done_valid(tst_valid)
  );

  // ---------------- position estimator -----------------------------------------------------
  abc_t resp_i, resp_ii;

  position_estimator u_est (
    .clk, .rst_n,
    .store(mid_valid && d2_ok && tst_valid), .store_sel(tst_sel), .d2,
    .resp_i, .resp_ii,
    .tr_start, .tr_done, .xy_i(ct_y[2]), .xy_ii(ct_y[3]), .alpha_i(th_i),
    .theta_est, .est_valid, .omega_est
  );

  // ---------------- gain tuning and PI controller ------------------------------------------
  logic [15:0] gain [4];
  logic        step_up, step_dn;

  rotary_tuner u_tune (
    .clk, .rst_n, .enc_a, .enc_b, .sel(gain_sel), .count(gain_count), .gain,
    .step_up, .step_dn
  );

  logic ctrl_req, ctrl_armed, pi_start;
  qd_t  v_pi;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl_req   <= 1'b0;
      ctrl_armed <= 1'b0;
      pi_start   <= 1'b0;
    end else begin
      pi_start <= 1'b0;
      if (mid_valid) ctrl_req <= 1'b1;
      if (tr_start && ctrl_req && !mid_valid) begin
        ctrl_armed <= 1'b1;
        ctrl_req   <= 1'b0;
      end
      if (tr_done && ctrl_armed) begin
        ctrl_armed <= 1'b0;
        pi_start   <= 1'b1;
      end
    end
  end

  pi_controller u_pi (
    .clk, .rst_n, .start(pi_start), .i_ref('{q: iq_ref, d: id_ref}), .i_meas(ct_y[1]),
    .omega(omega_est),
    .kp_q(gain[0]), .ki_q(gain[1]), .kp_d(gain[2]), .ki_d(gain[3]),
    .v(v_pi), .done(pi_done), .limited(pi_limited)
  );

  // ---------------- transformation operands ------------------------------------------------
  always_comb begin
    ct_x[0]   = v_abc;    ct_th[0]  = theta_r;     // CT1: motor voltages
    ct_x[1]   = i_mid;    ct_th[1]  = theta_est;   // CT2: measured currents
    ct_x[2]   = resp_i;   ct_th[2]  = th_i;        // CT3: response to test I
    ct_x[3]   = resp_ii;  ct_th[3]  = th_ii;       // CT4: response to test II
    ict_x[0]  = i_qd;     ict_th[0] = theta_r;     // ICT1: motor currents
    ict_x[1]  = v_pi;     ict_th[1] = theta_est;   // ICT2: controller voltages
    ict_x[2]  = tst_dv;   ict_th[2] = tst_th;      // ICT3: test vector
  end

  // ---------------- PWM reference: controller voltage plus test vector ---------------------
  // The controller voltage changes only at the mid-period boundary; v_hold keeps the value
  // in use for the first half of the next period.
  abc_t v_hold, v_ctrl;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         v_hold <= '0;
    else if (mid_pulse) v_hold <= ict_y[1];
  end

  assign v_ctrl  = second_half ? v_hold : ict_y[1];
  assign v_ref.a = sat(48'(v_ctrl.a) + 48'(ict_y[2].a));
  assign v_ref.b = sat(48'(v_ctrl.b) + 48'(ict_y[2].b));
  assign v_ref.c = sat(48'(v_ctrl.c) + 48'(ict_y[2].c));

endmodule
