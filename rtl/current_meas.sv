// current_meas: phase-current sampling for the current controller and the position estimator.
//
// The phase currents are sampled at every half-PWM-period boundary, after a conversion delay
// of SAMPLE_DELAY clocks (3 us by default, the A/D conversion time the paper quotes for a
// real drive; it also covers the latency of the motor model and its inverse Park output).
// The sample taken at mid-period is the controller's current measurement: with centre-aligned
// PWM it is close to the period average, and the test pulse pairs leave no flux deviation
// there. For the estimator the block forms, at every mid-period sample, the second
// difference around the preceding period boundary:
//   d2 = (i[valley] - i[mid before]) - (i[mid now] - i[valley]).
// A test pair applies +dv in the first of these half periods and -dv in the second, so the
// ripple due to the (unchanged) controller voltage cancels and d2 = 2*tau*L^-1*dv remains,
// the response to the test vector. The paper samples at the start and end of each half
// period during a test; the second-difference form is this design's choice.
//
// Interface: boundary (first clock of a half period) and at_mid (that boundary is mid-period);
// i_abc (Q4.13 pu, from the motor model); mid_valid pulses with i_mid and d2 (d2_ok when two
// earlier samples exist).
module current_meas
  import pmsm_pkg::*;
#(
  parameter int unsigned SAMPLE_DELAY = 120
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  boundary,
  input  logic  at_mid,
  input  abc_t  i_abc,
  output abc_t  i_mid,
  output abc_t  d2,
  output logic  d2_ok,
  output logic  mid_valid
);

  localparam int CW = $clog2(SAMPLE_DELAY + 2);

  logic [CW-1:0] dly;
  logic          pend, pend_mid;
  abc_t          s1, s2;       // previous and second-previous samples
  logic [1:0]    nsamp;

  function automatic sample_t dd(input sample_t p2, input sample_t p1, input sample_t p0);
    return sat((48'(p1) <<< 1) - 48'(p2) - 48'(p0));
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dly       <= '0;
      pend      <= 1'b0;
      pend_mid  <= 1'b0;
      s1        <= '0;
      s2        <= '0;
      nsamp     <= '0;
      i_mid     <= '0;
      d2        <= '0;
      d2_ok     <= 1'b0;
      mid_valid <= 1'b0;
    end else begin
      mid_valid <= 1'b0;
      if (boundary) begin
        pend     <= 1'b1;
        pend_mid <= at_mid;
        dly      <= '0;
      end else if (pend) begin
        if (32'(dly) == SAMPLE_DELAY - 1) begin
          pend <= 1'b0;
          s1   <= i_abc;
          s2   <= s1;
          if (nsamp != 2'd2) nsamp <= nsamp + 1'b1;
          if (pend_mid) begin
            i_mid     <= i_abc;
            d2.a      <= dd(s2.a, s1.a, i_abc.a);
            d2.b      <= dd(s2.b, s1.b, i_abc.b);
            d2.c      <= dd(s2.c, s1.c, i_abc.c);
            d2_ok     <= (nsamp == 2'd2);
            mid_valid <= 1'b1;
          end
        end else begin
          dly <= dly + 1'b1;
        end
      end
    end
  end

endmodule
