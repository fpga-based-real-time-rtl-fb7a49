// cordic_sincos: sine and cosine of a binary angle by CORDIC rotation.
//
// The paper computes the sine and cosine used by every Park and inverse Park
// transformation with a CORDIC block of 7 steps; ITER defaults to that number. The angle is
// first folded into [-pi/2, pi/2) (adding pi and negating both results when it lies outside),
// then ITER shift-and-add rotations drive the residual angle to zero starting from the vector
// (K, 0), K being the CORDIC gain compensation, so that the final vector is (cos, sin).
// The rotations are unrolled and purely combinational; the results are registered when `en`
// is high, so sin/cos appear one clock after the angle. With 7 steps the residual angle error
// is below atan(2^-6), about 0.9 degrees.
//
// Interface: theta (binary angle, one turn = 2^18), en; sin_o/cos_o in Q4.13 per-unit.
// The internal 20-bit datapath with 16 fraction bits is this design's choice.
module cordic_sincos
  import pmsm_pkg::*;
#(
  parameter int unsigned ITER  = 7,
  parameter int          KGAIN = CORDIC_K7
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,
  input  angle_t  theta,
  output sample_t sin_o,
  output sample_t cos_o
);

  localparam int IW = 20;   // internal width, 16 fraction bits
  typedef logic signed [IW-1:0] iw_t;

  iw_t x [ITER+1];
  iw_t y [ITER+1];
  iw_t z [ITER+1];
  logic flip;

  always_comb begin
    // Fold into [-pi/2, pi/2): the two top angle bits differ outside that range.
    flip = theta[AW-1] ^ theta[AW-2];
    x[0] = iw_t'(KGAIN);
    y[0] = '0;
    z[0] = iw_t'(signed'(flip ? (theta ^ ANG_PI) : theta));
    for (int i = 0; i < ITER; i++) begin
      if (!z[i][IW-1]) begin
        x[i+1] = x[i] - (y[i] >>> i);
        y[i+1] = y[i] + (x[i] >>> i);
        z[i+1] = z[i] - iw_t'(ATAN_TAB[i]);
      end else begin
        x[i+1] = x[i] + (y[i] >>> i);
        y[i+1] = y[i] - (x[i] >>> i);
        z[i+1] = z[i] + iw_t'(ATAN_TAB[i]);
      end
    end
  end

  // Round 16 fraction bits to 13 and undo the fold.
  iw_t cos_r, sin_r;
  always_comb begin
    cos_r = (x[ITER] + iw_t'(4)) >>> 3;
    sin_r = (y[ITER] + iw_t'(4)) >>> 3;
    if (flip) begin
      cos_r = -cos_r;
      sin_r = -sin_r;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sin_o <= '0;
      cos_o <= '0;
    end else if (en) begin
      sin_o <= sample_t'(sin_r);
      cos_o <= sample_t'(cos_r);
    end
  end

endmodule
