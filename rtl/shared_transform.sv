// shared_transform: four Park (CT1..CT4) and three inverse Park (ICT1..ICT3) transformations
// computed one after another on a single CORDIC sine/cosine block and a single multiplier block.
//
// This is the resource-sharing scheme of the paper: instead of seven transformation blocks,
// each with its own sine/cosine and multipliers, selectors steer the operands of all seven
// through one set of arithmetic. The selector names and ranges are the paper's:
//   SEL6  (0..6) picks the angle fed to the CORDIC block, in the input order
//         thICT1, thCT1, thICT2, thICT3, thCT2, thCT3, thCT4 (SEL6 = 1 selects thCT1);
//   SEL2  (0/1) makes the CORDIC result used the sine (0) or the cosine (1);
//   SEL4  (0..3) picks the abc input of a Park block, SEL3 (0..2) the qd input of an inverse
//         Park block;
//   SEL6d (0..6) is SEL6 one step later and enables the output register of the transformation
//         whose product leaves the multiplier, in the output order
//         ICT1, CT1, ICT2, ICT3, CT2, CT3, CT4.
// Each transformation takes a sine step and a cosine step. In the sine step the two products
// with sin(theta) are kept in two partial registers; in the cosine step the products with
// cos(theta) are added and the result is written to the transformation's output register.
// The seven transformations run in SEL6 order, 0 to 6; the SEL6d register is one step behind,
// so one run is 14 steps plus one to empty the pipeline, after which the unit waits for the
// next `start` (END / WAIT / START). The sequence is a simplified, strictly regular version of
// the state sequence the paper draws; it is this design's choice, as are the multiplier
// block's insides (two 18x18 products) and the fixed-point scaling.
//
// Conventions (the paper's Fig. 2): the q axis lies at angle theta from phase a, the d axis
// leads it by 90 degrees. Park, amplitude invariant:
//   alpha = (2a - b - c)/3, beta = (b - c)/sqrt(3),
//   q = alpha*cos + beta*sin,  d = -alpha*sin + beta*cos.
// Inverse Park: alpha = q*cos - d*sin, beta = q*sin + d*cos, a = alpha,
//   b = -alpha/2 + sqrt(3)/2*beta, c = -alpha/2 - sqrt(3)/2*beta.
//
// Timing: `start` samples nothing; the inputs must stay stable until `done`, which pulses
// 16 clocks after `start`. The outputs hold their values between runs.
module shared_transform
  import pmsm_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  // Park inputs CT1..CT4 (index 0..3) and inverse Park inputs ICT1..ICT3 (index 0..2)
  input  abc_t    ct_x   [4],
  input  angle_t  ct_th  [4],
  input  qd_t     ict_x  [3],
  input  angle_t  ict_th [3],
  output qd_t     ct_y   [4],
  output abc_t    ict_y  [3],
  output logic    busy,
  output logic    done
);

  // SEL6 index -> transformation, the paper's input order.
  localparam int NSLOT = 7;
  localparam logic [6:0] SLOT_IS_CT = 7'b1110010;          // bit k: slot k is a Park block
  localparam int SLOT_IDX [NSLOT] = '{0, 0, 1, 2, 1, 2, 3}; // SEL3 or SEL4 value of slot k

  localparam int signed C_1_3     = 21845;   // 1/3       * 2^16
  localparam int signed C_1_SQRT3 = 37837;   // 1/sqrt(3) * 2^16
  localparam int signed C_SQRT3_2 = 56756;   // sqrt(3)/2 * 2^16

  // ---------------- sequencer -----------------------------------------------------------
  logic [3:0] step;          // 0..13: SEL6 = step/2, SEL2 = step%2
  logic       run;           // issuing steps
  logic       drain;         // last product in the multiplier
  logic [2:0] sel6, sel6d;
  logic       sel2, sel2d;
  logic       mul_en;        // a product is due this clock (SEL6d valid)

  assign sel6 = step[3:1];
  assign sel2 = step[0];
  assign busy = run | drain;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step   <= '0;
      run    <= 1'b0;
      drain  <= 1'b0;
      sel6d  <= '0;
      sel2d  <= 1'b0;
      mul_en <= 1'b0;
      done   <= 1'b0;
    end else begin
      done   <= 1'b0;
      drain  <= 1'b0;
      mul_en <= run;
      sel6d  <= sel6;
      sel2d  <= sel2;
      if (start && !busy) begin
        run  <= 1'b1;
        step <= '0;
      end else if (run) begin
        if (step == 4'd13) begin
          run   <= 1'b0;
          drain <= 1'b1;
          step  <= '0;
        end else begin
          step <= step + 1'b1;
        end
      end
      if (drain) done <= 1'b1;
    end
  end

  // ---------------- CORDIC sine/cosine, angle selected by SEL6 ---------------------------
  angle_t  th_sel;
  sample_t s_val, c_val, trig;

  always_comb begin
    unique case (sel6)
      3'd0:    th_sel = ict_th[0];
      3'd1:    th_sel = ct_th[0];
      3'd2:    th_sel = ict_th[1];
      3'd3:    th_sel = ict_th[2];
      3'd4:    th_sel = ct_th[1];
      3'd5:    th_sel = ct_th[2];
      default: th_sel = ct_th[3];
    endcase
  end

  cordic_sincos #(.ITER(7)) u_sincos (
    .clk, .rst_n, .en(run), .theta(th_sel), .sin_o(s_val), .cos_o(c_val)
  );

  assign trig = sel2d ? c_val : s_val;   // SEL2 output multiplexer

  // ---------------- multiplier block, operands selected by SEL3 / SEL4 --------------------
  logic    is_ct;
  int      idx;
  abc_t    xa;
  qd_t     xq;
  sample_t alpha_in, beta_in, u1, u2;
  logic signed [35:0] m1, m2;
  logic signed [35:0] p1, p2;           // partial registers (products with sin)
  logic signed [35:0] o1, o2;           // sums after the cosine step (Q.26)
  sample_t r1, r2;
  logic signed [35:0] half_a, b_part;
  abc_t    inv_abc;

  always_comb begin
    is_ct = SLOT_IS_CT[sel6d];
    idx   = SLOT_IDX[sel6d];
    xa    = ct_x[idx[1:0]];             // SEL4
    xq    = ict_x[(idx > 2) ? 0 : idx]; // SEL3
    // Clarke transform of the abc operand (constant multipliers).
    alpha_in = sat(48'((36'(signed'({xa.a, 1'b0})) - 36'(xa.b) - 36'(xa.c)) * C_1_3) >>> 16);
    beta_in  = sat(48'((36'(xa.b) - 36'(xa.c)) * C_1_SQRT3) >>> 16);
    if (is_ct) begin
      u1 = sel2d ? alpha_in : beta_in;
      u2 = sel2d ? beta_in  : alpha_in;
    end else begin
      u1 = sel2d ? xq.q : xq.d;
      u2 = sel2d ? xq.d : xq.q;
    end
    m1 = u1 * trig;
    m2 = u2 * trig;
    o1 = m1 + p1;
    o2 = m2 + p2;
    r1 = sat(48'(o1 >>> FRAC));
    r2 = sat(48'(o2 >>> FRAC));
    // Inverse Clarke of (alpha, beta) = (r1, r2).
    half_a    = 36'(r1) <<< 15;                       // alpha/2 in Q.16
    b_part    = 36'(r2) * C_SQRT3_2;                  // sqrt(3)/2 * beta in Q.16
    inv_abc.a = r1;
    inv_abc.b = sat(48'((b_part - half_a) >>> 16));
    inv_abc.c = sat(48'((-b_part - half_a) >>> 16));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p1 <= '0;
      p2 <= '0;
      for (int k = 0; k < 4; k++) ct_y[k]  <= '0;
      for (int k = 0; k < 3; k++) ict_y[k] <= '0;
    end else if (mul_en) begin
      if (!sel2d) begin
        // sine step: Park keeps (beta*s, -alpha*s), inverse Park keeps (-d*s, q*s)
        p1 <= is_ct ? m1 : -m1;
        p2 <= is_ct ? -m2 : m2;
      end else begin
        // cosine step: output register enabled by SEL6d
        if (is_ct) ct_y[idx[1:0]] <= '{q: r1, d: r2};
        else       ict_y[(idx > 2) ? 0 : idx] <= inv_abc;
      end
    end
  end

endmodule
