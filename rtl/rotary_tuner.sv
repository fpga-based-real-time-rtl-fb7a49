// rotary_tuner: PI gain tuning from a mechanical rotary (quadrature) encoder.
//
// Following the paper, the two encoder outputs first pass a digital low-pass filter that
// removes the short pulses and spikes a mechanical contact produces around each edge: a
// filtered output only takes a new input level after the input has held it for FILT
// consecutive clocks. The direction is then found by comparing the two filtered pulses: on each
// rising edge of filtered A, a low B means one step up, a high B one step down. The steps are
// counted, in units of 0.01 (the paper's step size), into the gain chosen by `sel` and
// limited to [GMIN, GMAX]. The reset values are the gains the paper settles on:
// Kp_q = 0.47, Ki_q = 0.55, Kp_d = 0.23, Ki_d = 0.28.
// The filter length, the direction rule, the limits and the `sel` input are this design's
// choices.
//
// Interface: enc_a/enc_b raw encoder outputs (asynchronous, synchronised here); sel picks
// the gain (0: Kp_q, 1: Ki_q, 2: Kp_d, 3: Ki_d); count[k] in steps of 0.01; gain[k] the same
// value with 14 fraction bits (count * 164, 0.01 ~ 164/2^14).
module rotary_tuner #(
  parameter int unsigned FILT = 40000,   // 1 ms at 40 MHz
  parameter int unsigned GMIN = 0,
  parameter int unsigned GMAX = 200      // 2.00
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enc_a,
  input  logic        enc_b,
  input  logic [1:0]  sel,
  output logic [7:0]  count [4],
  output logic [15:0] gain  [4],
  output logic        step_up,     // one-clock pulses, for observation
  output logic        step_dn
);

  localparam int CW = $clog2(FILT + 1);
  localparam logic [7:0] INIT [4] = '{8'd47, 8'd55, 8'd23, 8'd28};
  localparam logic [15:0] STEP = 16'd164;

  logic [1:0]    sync_a, sync_b;
  logic          fa, fb, fa_q;
  logic [CW-1:0] ca, cb;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync_a <= '0;
      sync_b <= '0;
      fa     <= 1'b0;
      fb     <= 1'b0;
      fa_q   <= 1'b0;
      ca     <= '0;
      cb     <= '0;
    end else begin
      sync_a <= {sync_a[0], enc_a};
      sync_b <= {sync_b[0], enc_b};
      fa_q   <= fa;
      // low-pass filters: accept a level only after FILT stable clocks
      if (sync_a[1] == fa) ca <= '0;
      else if (32'(ca) == FILT - 1) begin
        fa <= sync_a[1];
        ca <= '0;
      end else ca <= ca + 1'b1;
      if (sync_b[1] == fb) cb <= '0;
      else if (32'(cb) == FILT - 1) begin
        fb <= sync_b[1];
        cb <= '0;
      end else cb <= cb + 1'b1;
    end
  end

  assign step_up = fa && !fa_q && !fb;
  assign step_dn = fa && !fa_q &&  fb;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 4; k++) count[k] <= INIT[k];
    end else begin
      if (step_up && 32'(count[sel]) < GMAX) count[sel] <= count[sel] + 1'b1;
      if (step_dn && 32'(count[sel]) > GMIN) count[sel] <= count[sel] - 1'b1;
    end
  end

  always_comb begin
    for (int k = 0; k < 4; k++) gain[k] = 16'(count[k] * STEP);
  end

endmodule
