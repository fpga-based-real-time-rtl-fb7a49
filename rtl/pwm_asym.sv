// pwm_asym: asymmetric, centre-aligned three-phase PWM generator.
//
// A PWM period (125 us, 5000 clocks of 25 ns) is two half periods of HALF clocks. In the first
// half a leg switches on late, in the second half it switches off early, so the on-pulse is
// centred on mid-period, where the controller samples the currents. Unlike symmetric PWM the
// duty ratio is reloaded at every half-period boundary (asymmetric PWM, as the paper
// requires for test vectors every PWM period): at each boundary the phase voltage references
// are converted to compare values, cmp = HALF/2 + v*HALF/Vdc, limited to 0..HALF. During a
// half period with compare value cmp the leg is on for cmp clocks, so the leg voltage
// averaged over the half period is v with respect to the DC-link midpoint.
//
// Interface: v_ref (Q4.13 pu phase voltages) is sampled on the last clock of each half period;
// leg[k] is the upper-switch state of phase k; second_half tells the present half; mid_pulse
// and valley_pulse are high on the first clock of the second and the first half. VDC_K is
// HALF*2^16 / (Vdc*2^13) for the DC-link voltage Vdc in pu (default Vdc = 3 pu = 300 V).
module pwm_asym
  import pmsm_pkg::*;
#(
  parameter int unsigned HALF  = HALF_CYCLES,
  parameter int          VDC_K = 6667
) (
  input  logic       clk,
  input  logic       rst_n,
  input  abc_t       v_ref,
  output logic [2:0] leg,
  output logic       second_half,
  output logic       mid_pulse,
  output logic       valley_pulse
);

  localparam int CW = $clog2(HALF + 1);

  logic [CW-1:0] cnt;
  logic [CW-1:0] cmp [3];
  sample_t       vph [3];

  assign vph[0] = v_ref.a;
  assign vph[1] = v_ref.b;
  assign vph[2] = v_ref.c;

  function automatic logic [CW-1:0] to_cmp(input sample_t v);
    logic signed [47:0] c;
    c = 48'(int'(HALF / 2)) + ((48'(v) * 48'(VDC_K)) >>> 16);
    if (c < 0)                return '0;
    else if (c > 48'(HALF))   return CW'(HALF);
    else                      return CW'(c);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt         <= '0;
      second_half <= 1'b0;
      for (int k = 0; k < 3; k++) cmp[k] <= CW'(HALF / 2);
    end else begin
      if (cnt == CW'(HALF - 1)) begin
        cnt         <= '0;
        second_half <= ~second_half;
        for (int k = 0; k < 3; k++) cmp[k] <= to_cmp(vph[k]);
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  always_comb begin
    for (int k = 0; k < 3; k++)
      leg[k] = second_half ? (cnt < cmp[k]) : (32'(cnt) >= HALF - 32'(cmp[k]));
    mid_pulse    = (cnt == '0) &&  second_half;
    valley_pulse = (cnt == '0) && !second_half;
  end

endmodule
