// test_signal_gen: voltage test vectors for the standstill position estimator.
//
// The estimator needs the current response to two test voltage vectors of equal amplitude
// DV, test vector I at stator angle ALPHA_I and test vector II displaced by DGAMMA. The test
// vectors ride on the controller output so that the stator flux deviation is zero again at
// the moments the controller samples the currents (mid PWM period): each test is a pair of
// half PWM periods, +dv in the second half of a period and -dv in the first half of the next.
// The asymmetric PWM can change the duty ratio every half period, so a test pair starts in
// every PWM period, alternating I, II, I, II... The alternation, pulse order, amplitude and
// angles are this design's reading; the paper gives their purpose, not their values.
//
// The outputs always describe the half period that starts at the next PWM boundary, as a qd
// vector (q = +-DV along the test direction, d = 0) plus the angle, ready for an inverse
// Park transformation into phase voltages before the PWM latches them.
//
// Interface: second_half is the PWM's present half; mid_pulse marks the boundary into the
// second half. At that boundary a test pair ends: done_pulse then reports it, with done_sel
// (0: test I, 1: test II) and done_valid (both halves carried the test vector).
module test_signal_gen
  import pmsm_pkg::*;
#(
  parameter angle_t  ALPHA_I = '0,                 // test vector I along phase a
  parameter angle_t  DGAMMA  = angle_t'(65536),    // 90 degrees
  parameter sample_t DV      = sample_t'(8192)     // 1.0 pu = 100 V
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,
  input  logic    second_half,
  input  logic    mid_pulse,
  output angle_t  th_o,
  output qd_t     dv_o,
  output angle_t  th_i,        // angle of test vector I
  output angle_t  th_ii,       // angle of test vector II
  output logic    done_pulse,
  output logic    done_sel,
  output logic    done_valid
);

  logic pair_sel;   // test of the pair started at the latest mid boundary
  logic pair_en;    // that pair carries a test vector

  assign th_i  = ALPHA_I;
  assign th_ii = ALPHA_I + DGAMMA;

  always_comb begin
    dv_o.d = '0;
    if (!second_half) begin
      // next half is a second half: a new pair starts with +dv
      th_o   = (!pair_sel) ? th_ii : th_i;
      dv_o.q = en ? DV : '0;
    end else begin
      // next half is a first half: the running pair ends with -dv
      th_o   = pair_sel ? th_ii : th_i;
      dv_o.q = pair_en ? -DV : '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pair_sel   <= 1'b1;   // the first pair is test I
      pair_en    <= 1'b0;
      done_pulse <= 1'b0;
      done_sel   <= 1'b0;
      done_valid <= 1'b0;
    end else begin
      done_pulse <= 1'b0;
      if (mid_pulse) begin
        done_pulse <= 1'b1;
        done_sel   <= pair_sel;
        done_valid <= pair_en;
        pair_sel   <= ~pair_sel;
        pair_en    <= en;
      end
    end
  end

endmodule
