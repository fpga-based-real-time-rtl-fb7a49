// pmsm_pkg: number formats and shared constants of the PMSM drive emulator.
//
// All physical quantities are per-unit values in signed 18-bit fixed point with 13 fraction
// bits (sample_t, Q4.13, range +-16 pu), a width that matches the 18x18 embedded multipliers
// of the target FPGA family. The per-unit bases are 10 A and 100 V; they are this design's
// choice. Angles are 18-bit binary angles (angle_t): the full word spans one turn, so
// 2^17 is pi and wrap-around is free.
//
// The timing constants follow the paper: a 25 ns system clock, an integration interval of
// 2.5 us (100 clocks, 50 per 125 us PWM period) and a half PWM period of 62.5 us. The motor
// and inverter numbers (R, Ld, Lq, Vdc, test amplitude) are this design's choice, the paper
// gives none.
package pmsm_pkg;

  localparam int unsigned W    = 18;   // sample width
  localparam int unsigned FRAC = 13;   // fraction bits of sample_t
  localparam int unsigned AW   = 18;   // binary angle width

  typedef logic signed [W-1:0]  sample_t;
  typedef logic signed [AW-1:0] angle_t;

  // Three-phase and two-axis vectors.
  typedef struct packed {
    sample_t a;
    sample_t b;
    sample_t c;
  } abc_t;

  typedef struct packed {
    sample_t q;
    sample_t d;
  } qd_t;

  // Per-unit one.
  localparam sample_t ONE_PU = sample_t'(1 <<< FRAC);

  // Binary-angle constants.
  localparam angle_t ANG_PI    = angle_t'(1 << (AW-1));   // pi (same bits as -pi)
  localparam angle_t ANG_PI_2  = angle_t'(1 << (AW-2));   // pi/2
  localparam angle_t ANG_PI_4  = angle_t'(1 << (AW-3));   // pi/4

  // Timing, in 25 ns clocks.
  localparam int unsigned FRAME_CYCLES = 100;    // integration interval 2.5 us
  localparam int unsigned HALF_CYCLES  = 2500;   // half PWM period 62.5 us

  // CORDIC elementary angles atan(2^-i) in binary-angle units, i = 0..15:
  // round(atan(2^-i) / (2*pi) * 2^18).
  localparam int ATAN_TAB [16] = '{32768, 19344, 10221, 5188, 2604, 1303, 652, 326,
                                   163, 81, 41, 20, 10, 5, 3, 1};

  // CORDIC gain compensation prod(1/sqrt(1 + 2^-2i)) for 7 steps, with 16 fraction bits.
  localparam int CORDIC_K7 = 39799;

  // Saturate a wider signed value to sample_t.
  function automatic sample_t sat(input logic signed [47:0] v);
    if (v > 48'sd131071)       return sample_t'(18'sh1FFFF);
    else if (v < -48'sd131072) return sample_t'(18'sh20000);
    else                       return sample_t'(v[W-1:0]);
  endfunction

endpackage
