// gate_drive: complementary gate commands with dead time for the three inverter legs.
//
// The paper lists a gate-drive module among its six second-level modules and says the PWM
// generator provides the gate-driver logic commands; it gives nothing more. This block derives
// the upper and lower switch commands of each leg from the PWM leg state so that the two
// switches of a leg are never on together: on every change of the leg state the switch that
// was on turns off at once, and the other one turns on only after the state has been stable
// for DT clocks. The dead time value (1 us) is this design's choice.
//
// Interface: leg[k] PWM state of phase k; gate_hi[k]/gate_lo[k] registered switch commands,
// one clock behind leg after a stable period of DT clocks. Both are off after reset until the
// first DT clocks have passed.
module gate_drive #(
  parameter int unsigned DT = 40
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] leg,
  output logic [2:0] gate_hi,
  output logic [2:0] gate_lo
);

  localparam int CW = $clog2(DT + 2);

  logic [2:0]    leg_q;
  logic [CW-1:0] stable [3];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      leg_q   <= '0;
      gate_hi <= '0;
      gate_lo <= '0;
      for (int k = 0; k < 3; k++) stable[k] <= '0;
    end else begin
      leg_q <= leg;
      for (int k = 0; k < 3; k++) begin
        if (leg[k] != leg_q[k]) begin
          stable[k]  <= '0;
          gate_hi[k] <= 1'b0;
          gate_lo[k] <= 1'b0;
        end else begin
          if (32'(stable[k]) < DT) stable[k] <= stable[k] + 1'b1;
          gate_hi[k] <=  leg[k] && (32'(stable[k]) + 1 >= DT);
          gate_lo[k] <= !leg[k] && (32'(stable[k]) + 1 >= DT);
        end
      end
    end
  end

  // The two switches of a leg are never commanded on together.
  a_no_shoot_through: assert property (@(posedge clk) disable iff (!rst_n)
    (gate_hi & gate_lo) == 3'b000)
    else $error("shoot-through command on a leg");

endmodule
