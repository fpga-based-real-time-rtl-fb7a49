// cordic_atan2: four-quadrant arctangent of (y, x) by iterative CORDIC vectoring.
//
// The paper estimates the rotor position with a CORDIC ATAN2 of 11 steps; ITER defaults to
// that number. A vector with negative x is first turned by pi (both components negated, pi
// added to the angle accumulator), then each step rotates the vector towards the positive
// x axis by +-atan(2^-i) and accumulates the angle. One step is done per clock, so `done`
// pulses ITER+1 clocks after `start`; a start while busy is ignored. The magnitude gain of
// CORDIC does not matter for the angle and is not compensated.
//
// Interface: start with y_i/x_i (Q4.13, any common scale), done pulse with angle_o
// (binary angle, one turn = 2^18, range [-pi, pi)). The result is angle_o = 0 for y = x = 0.
// The sequential (one step per clock) form is this design's choice.
module cordic_atan2
  import pmsm_pkg::*;
#(
  parameter int unsigned ITER = 11
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  sample_t y_i,
  input  sample_t x_i,
  output logic    busy,
  output logic    done,
  output angle_t  angle_o
);

  localparam int IW = 21;   // 18 bits + CORDIC growth + guard
  typedef logic signed [IW-1:0] iw_t;
  localparam int CW = (ITER > 1) ? $clog2(ITER) : 1;

  iw_t            x, y;
  angle_t         z;
  logic [CW-1:0]  step;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x       <= '0;
      y       <= '0;
      z       <= '0;
      step    <= '0;
      busy    <= 1'b0;
      done    <= 1'b0;
      angle_o <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        if (x_i < 0) begin
          x <= -iw_t'(x_i);
          y <= -iw_t'(y_i);
          z <= ANG_PI;
        end else begin
          x <= iw_t'(x_i);
          y <= iw_t'(y_i);
          z <= '0;
        end
        step <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        if (!y[IW-1]) begin          // y >= 0: rotate clockwise
          x <= x + (y >>> step);
          y <= y - (x >>> step);
          z <= z + angle_t'(ATAN_TAB[step]);
        end else begin
          x <= x - (y >>> step);
          y <= y + (x >>> step);
          z <= z - angle_t'(ATAN_TAB[step]);
        end
        if (step == CW'(ITER - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          if (!y[IW-1]) angle_o <= z + angle_t'(ATAN_TAB[step]);
          else          angle_o <= z - angle_t'(ATAN_TAB[step]);
        end
        step <= step + 1'b1;
      end
    end
  end

endmodule
