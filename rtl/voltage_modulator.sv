// voltage_modulator: ideal three-phase two-level inverter feeding the PMSM model.
//
// In the paper's emulator the voltage modulator turns the PWM switching commands into the
// phase voltages that supply the motor model. For a star-connected motor fed from a DC link
// Vdc, the phase voltage is v_a = Vdc/3 * (2*s_a - s_b - s_c) for leg states s in {0,1}
// (likewise for b and c). The motor model is only evaluated once per integration interval, so
// instead of sampling the leg states this block counts, over each interval of N clocks, the
// clocks each leg is on and outputs the interval-average phase voltage:
//   v_a = Vdc/(3N) * (2*n_a - n_b - n_c).
// This keeps switching edges that fall inside an interval, to one clock. The averaging and the
// ideal switches (no dead time, no voltage drops) are this design's choices.
//
// Interface: leg[k] upper-switch state; frame_end high on the last clock of an interval;
// v_abc (Q4.13 pu) and valid change on the clock after frame_end. KV = Vdc*2^13*2^16/(3N) with
// Vdc in pu (default 3 pu, N = 100).
module voltage_modulator
  import pmsm_pkg::*;
#(
  parameter int unsigned N  = FRAME_CYCLES,
  parameter int          KV = 5368709
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] leg,
  input  logic       frame_end,
  output abc_t       v_abc,
  output logic       valid
);

  localparam int CW = $clog2(N + 1);

  logic [CW-1:0] n    [3];
  logic [CW-1:0] nfin [3];
  logic signed [47:0] acc [3];

  always_comb begin
    for (int k = 0; k < 3; k++) nfin[k] = n[k] + CW'(leg[k]);
    acc[0] = 48'(2 * int'(nfin[0]) - int'(nfin[1]) - int'(nfin[2])) * 48'(KV);
    acc[1] = 48'(2 * int'(nfin[1]) - int'(nfin[0]) - int'(nfin[2])) * 48'(KV);
    acc[2] = 48'(2 * int'(nfin[2]) - int'(nfin[0]) - int'(nfin[1])) * 48'(KV);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 3; k++) n[k] <= '0;
      v_abc <= '0;
      valid <= 1'b0;
    end else begin
      valid <= 1'b0;
      if (frame_end) begin
        for (int k = 0; k < 3; k++) n[k] <= '0;
        v_abc.a <= sat(acc[0] >>> 16);
        v_abc.b <= sat(acc[1] >>> 16);
        v_abc.c <= sat(acc[2] >>> 16);
        valid   <= 1'b1;
      end else begin
        for (int k = 0; k < 3; k++) n[k] <= nfin[k];
      end
    end
  end

endmodule
