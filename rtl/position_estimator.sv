// position_estimator: parameterless rotor-position estimate at standstill from two test
// current responses.
//
// Theory (the paper's eqs. (6)-(8)): a test voltage vector dv at angle gamma from the q axis
// produces, in the xy frame aligned with dv (x along dv), the response
//   di_x = tau*dv*(S - D*cos(2*gamma)),  di_y = tau*dv*D*sin(2*gamma),
// S = (Lq+Ld)/(2LqLd), D = (Lq-Ld)/(2LqLd). A second vector of equal amplitude turned by
// dgamma gives the same with 2*gamma + 2*dgamma. The inductances drop out of
//   phi = atan2(di_yI - di_yII, di_xII - di_xI) = 2*gamma + dgamma - pi/2,
// so gamma = phi/2 - (2*dgamma - pi)/4 and the rotor (q axis) angle is theta = alpha_I - gamma,
// alpha_I being the stator angle of test vector I. The result is defined modulo pi (the
// saliency cannot tell north from south) and is given in [-pi/2, pi/2). The paper prints the
// offset as (2*dgamma + pi)/4 inside a half arctangent; with a four-quadrant arctangent the
// expression follows from (6) and (7) with the sign used here.
//
// Operation: the current measurement delivers the test responses in phase quantities
// (store/store_sel/d2). They are held in resp_i/resp_ii, which feed Park blocks CT3 and CT4
// of the shared transformation unit with the test-vector angles; their xy results come back
// on xy_i/xy_ii (x in the q slot, y in the d slot). After response II is stored and a full
// transformation run has completed, the 11-step CORDIC ATAN2 is started and est_valid
// pulses with the new theta_est about 14 clocks later.
//
// Speed: the paper's estimator also delivers the rotor speed, which the controller needs for
// decoupling. Here it is the change of the position estimate between two successive
// estimates, taken modulo pi like the position, divided by the time between them. The
// estimates follow each other every two PWM periods (100 integration intervals), so
//   omega_est = dtheta * pi / 2^17 / 100 * 2^24   (speed * 2.5 us, 24 fraction bits),
// computed as dtheta * OMEGA_K >>> 12 and limited to 18 bits. The first estimate after reset
// gives no speed (omega_est stays 0). This difference form is this design's choice; the
// paper names the speed estimate without saying how it is formed.
module position_estimator
  import pmsm_pkg::*;
#(
  parameter angle_t DGAMMA  = angle_t'(65536),  // 90 degrees
  parameter int     OMEGA_K = 16470              // pi*2^7/100 * 2^12
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    store,
  input  logic    store_sel,      // 0: response to test I, 1: to test II
  input  abc_t    d2,
  output abc_t    resp_i,
  output abc_t    resp_ii,
  input  logic    tr_start,
  input  logic    tr_done,
  input  qd_t     xy_i,
  input  qd_t     xy_ii,
  input  angle_t  alpha_i,
  output angle_t  theta_est,
  output logic    est_valid,
  output logic signed [17:0] omega_est   // speed * 2.5 us, 24 fraction bits
);

  logic have_i, pending, armed, at_start;
  sample_t num, den;
  logic    at_busy, at_done;
  angle_t  phi, gam, th, dth;
  logic    have_est;
  logic signed [47:0] w_full;
  logic signed [17:0] w_sat;

  assign num = sat(48'(xy_i.d) - 48'(xy_ii.d));
  assign den = sat(48'(xy_ii.q) - 48'(xy_i.q));

  cordic_atan2 #(.ITER(11)) u_atan2 (
    .clk, .rst_n, .start(at_start), .y_i(num), .x_i(den),
    .busy(at_busy), .done(at_done), .angle_o(phi)
  );

  always_comb begin
    gam = (phi >>> 1) - (DGAMMA >>> 1) + ANG_PI_4;
    th  = alpha_i - gam;
    if (th[AW-1] ^ th[AW-2]) th = th ^ ANG_PI;   // fold into [-pi/2, pi/2)
    dth = th - theta_est;
    if (dth[AW-1] ^ dth[AW-2]) dth = dth ^ ANG_PI; // position change modulo pi
    w_full = (48'(dth) * 48'(OMEGA_K)) >>> 12;
    if (w_full > 48'(131071))       w_sat = 18'sd131071;
    else if (w_full < -48'(131072)) w_sat = -18'sd131072;
    else                            w_sat = w_full[17:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      resp_i    <= '0;
      resp_ii   <= '0;
      have_i    <= 1'b0;
      pending   <= 1'b0;
      armed     <= 1'b0;
      at_start  <= 1'b0;
      theta_est <= '0;
      est_valid <= 1'b0;
      have_est  <= 1'b0;
      omega_est <= '0;
    end else begin
      at_start  <= 1'b0;
      est_valid <= 1'b0;
      if (store) begin
        if (!store_sel) begin
          resp_i <= d2;
          have_i <= 1'b1;
        end else begin
          resp_ii <= d2;
          if (have_i) pending <= 1'b1;
          have_i <= 1'b0;
        end
      end
      if (tr_start && pending) begin
        armed   <= 1'b1;
        pending <= 1'b0;
      end
      if (tr_done && armed) begin
        armed    <= 1'b0;
        at_start <= 1'b1;
      end
      if (at_done) begin
        theta_est <= th;
        est_valid <= 1'b1;
        have_est  <= 1'b1;
        if (have_est) omega_est <= w_sat;
      end
    end
  end

endmodule
