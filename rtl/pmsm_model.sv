// pmsm_model: real-time discrete-time model of an interior PMSM in the rotor qd frame.
//
// The paper's model: the two coupled current equations
//   d iq/dt = f(iq, id) = vq/Lq - R/Lq*iq - w*Ld/Lq*id
//   d id/dt = g(iq, id) = vd/Ld - R/Ld*id + w*Lq/Ld*iq
// are integrated with forward Euler, iq[n+1] = iq[n] + dt*f, id[n+1] = id[n] + dt*g, with
// dt = 2.5 us. f and g are evaluated side by side by two parallel blocks from the same present
// currents, and each integrator is an adder with one state register per axis, enabled once per
// integration interval (every 100 clocks of 25 ns). The equations carry no permanent-magnet
// back-EMF term, as in the paper, which targets standstill.
//
// Fixed point (this design's choice): the coefficients dt/L (scaled by the per-unit bases) and
// dt*R/L are 18-bit integers with 24 fraction bits, the speed input is w*dt with 24 fraction
// bits and the inductance ratios carry 14 fraction bits. The integrator states keep
// 13 + 24 = 37 fraction bits in 48-bit registers, so the tiny per-step increments are not lost;
// the outputs are the states rounded down to Q4.13. The default coefficients describe a motor
// with R = 0.5 ohm, Ld = 8 mH, Lq = 16 mH on bases of 10 A and 100 V; the paper gives no
// motor data.
//
// Interface: en (one-clock integration strobe), v (qd voltage, Q4.13 pu), omega_dt;
// i (qd current, Q4.13 pu) changes on the clock after en and holds until the next en.
module pmsm_model
  import pmsm_pkg::*;
#(
  parameter int AQ   = 26214,   // dt*Vb/(Lq*Ib) * 2^24
  parameter int AD   = 52429,   // dt*Vb/(Ld*Ib) * 2^24
  parameter int BQ   = 1311,    // dt*R/Lq       * 2^24
  parameter int BD   = 2621,    // dt*R/Ld       * 2^24
  parameter int LDLQ = 8192,    // Ld/Lq * 2^14
  parameter int LQLD = 32768    // Lq/Ld * 2^14
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           en,
  input  qd_t            v,
  input  logic signed [17:0] omega_dt,
  output qd_t            i
);

  localparam int SW = 48;
  localparam int SH = 24;   // state fraction bits above Q4.13
  typedef logic signed [SW-1:0] st_t;

  st_t sq, sd;
  st_t f_dt, g_dt;
  logic signed [35:0] wq, wd;   // w*dt*Ld/Lq and w*dt*Lq/Ld, 24 fraction bits

  // f(iq[p], id[p]) and g(iq[p], id[p]), already multiplied by dt.
  always_comb begin
    wq   = (36'(omega_dt) * 36'(LDLQ)) >>> 14;
    wd   = (36'(omega_dt) * 36'(LQLD)) >>> 14;
    f_dt = st_t'(36'(AQ) * 36'(v.q)) - st_t'(36'(BQ) * 36'(i.q)) - st_t'(wq) * st_t'(i.d);
    g_dt = st_t'(36'(AD) * 36'(v.d)) - st_t'(36'(BD) * 36'(i.d)) + st_t'(wd) * st_t'(i.q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sq <= '0;
      sd <= '0;
    end else if (en) begin
      sq <= sq + f_dt;
      sd <= sd + g_dt;
    end
  end

  assign i.q = sat(48'(sq >>> SH));
  assign i.d = sat(48'(sd >>> SH));

endmodule
