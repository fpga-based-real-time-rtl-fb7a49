// pi_controller: discrete PI current controller for the q and d axes with anti-windup.
//
// Following the paper, one PI datapath (error subtractor, two gain multipliers, integrator
// adder, limiter) is reused for both axes: after `start` it computes the q axis in the first
// clock and the d axis in the second, and pulses `done` with both new voltage references. The
// controller is run once per PWM period with the current sample taken at mid-period.
//   e = i_ref - i_meas;  I[k] = I[k-1] + Ki*e;  v = Kp*e + I[k], limited to +-VLIM.
// Anti-windup is by conditional integration: while the output is limited and the error
// would drive it further into the limit, the integrator keeps its old value; the integrator
// is also clamped to +-VLIM. The paper says an anti-windup method is used but not which;
// this form, the limit value and the gain format are this design's choices.
// The paper also uses the rotor speed to remove the coupling between the axes caused by the
// speed-induced voltage. The controller adds the feed-forward terms that cancel the coupling
// terms of the motor equations, using the estimated speed and the measured currents:
//   v_q = PI_q + w*Ld*i_d,   v_d = PI_d - w*Lq*i_q,
// before the limiter, so the limit and the anti-windup act on the total. The same shared
// datapath forms one term per axis.
//
// Interface: gains are unsigned with 14 fraction bits (0.01 = 164); currents and voltages
// Q4.13 per-unit; omega is the electrical speed times 2.5 us with 24 fraction bits (the motor
// model's speed format). KLD and KLQ are Ld and Lq divided by 2.5 us, in per-unit
// (default Ld = 8 mH, Lq = 16 mH: 320 and 640). `done` pulses 3 clocks after `start`;
// v holds until the next run.
module pi_controller
  import pmsm_pkg::*;
#(
  parameter sample_t VLIM = sample_t'(4096),  // 0.5 pu
  parameter int      KLD  = 320,              // Ld/2.5us * 10 A/100 V
  parameter int      KLQ  = 640               // Lq/2.5us * 10 A/100 V
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  qd_t         i_ref,
  input  qd_t         i_meas,
  input  logic signed [17:0] omega,  // estimated speed * 2.5 us, 24 fraction bits
  input  logic [15:0] kp_q,
  input  logic [15:0] ki_q,
  input  logic [15:0] kp_d,
  input  logic [15:0] ki_d,
  output qd_t         v,
  output logic        done,
  output logic        limited      // an axis was limited in the last run
);

  logic    run;
  logic    ax;            // 0: q axis, 1: d axis
  sample_t integ [2];

  // Shared datapath, operands selected by ax.
  sample_t e, ref_s, meas_s, i_old, i_new, u_out;
  logic [15:0] kp, ki;
  logic signed [47:0] pterm, iterm, u, ff, xprod;
  logic sat_hi, sat_lo, hold;

  always_comb begin
    ref_s  = ax ? i_ref.d  : i_ref.q;
    meas_s = ax ? i_meas.d : i_meas.q;
    kp     = ax ? kp_d : kp_q;
    ki     = ax ? ki_d : ki_q;
    i_old  = integ[ax];
    e      = sat(48'(ref_s) - 48'(meas_s));
    pterm  = (48'(e) * 48'(signed'({1'b0, kp}))) >>> 14;
    iterm  = (48'(e) * 48'(signed'({1'b0, ki}))) >>> 14;
    // clamp integrator
    if (48'(i_old) + iterm > 48'(VLIM))       i_new = VLIM;
    else if (48'(i_old) + iterm < -48'(VLIM)) i_new = -VLIM;
    else                                      i_new = sample_t'(48'(i_old) + iterm);
    // decoupling feed-forward: +w*Ld*i_d on q, -w*Lq*i_q on d
    xprod  = 48'(omega) * 48'(ax ? i_meas.q : i_meas.d) * 48'(ax ? KLQ : KLD);
    ff     = ax ? -(xprod >>> 24) : (xprod >>> 24);
    u      = pterm + 48'(i_new) + ff;
    sat_hi = u > 48'(VLIM);
    sat_lo = u < -48'(VLIM);
    u_out  = sat_hi ? VLIM : (sat_lo ? -VLIM : sample_t'(u));
    // conditional integration: freeze when limited and the error pushes further
    hold   = (sat_hi && !e[W-1] && e != 0) || (sat_lo && e[W-1]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run      <= 1'b0;
      ax       <= 1'b0;
      done     <= 1'b0;
      limited  <= 1'b0;
      integ[0] <= '0;
      integ[1] <= '0;
      v        <= '0;
    end else begin
      done <= 1'b0;
      if (start && !run) begin
        run     <= 1'b1;
        ax      <= 1'b0;
        limited <= 1'b0;
      end else if (run) begin
        if (!hold) integ[ax] <= i_new;
        if (sat_hi || sat_lo) limited <= 1'b1;
        if (!ax) begin
          v.q <= u_out;
          ax  <= 1'b1;
        end else begin
          v.d  <= u_out;
          run  <= 1'b0;
          ax   <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
