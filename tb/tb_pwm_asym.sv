// tb_pwm_asym: runs the asymmetric PWM with a short half period (HALF = 100, Vdc = 3 pu) and
// a new random voltage reference for every half period. For each half it checks that each
// leg is on for HALF/2 + v/Vdc*HALF clocks (+-1), that the on-time sits at the end of a first
// half and at the start of a second half (centred on mid-period), and that the mid and
// valley pulses come every HALF clocks, alternately.
module tb_pwm_asym;
  import pmsm_pkg::*;
  localparam int HALF = 100;
  logic clk = 0, rst_n = 0;
  abc_t v_ref;
  logic [2:0] leg;
  logic second_half, mid_pulse, valley_pulse;
  int checks = 0, failures = 0;

  pwm_asym #(.HALF(HALF), .VDC_K(267)) dut (.clk, .rst_n, .v_ref, .leg, .second_half,
                                            .mid_pulse, .valley_pulse);

  always #5 clk = ~clk;

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expect_on(input sample_t v);
    real c;
    c = real'(HALF) / 2.0 + real'(v) / 8192.0 / 3.0 * real'(HALF);
    if (c < 0.0) c = 0.0;
    if (c > real'(HALF)) c = real'(HALF);
    return $rtoi(c + 0.5);
  endfunction

  initial begin
    abc_t cur;
    int on [3], first_on [3], last_on [3];
    bit sh;
    v_ref = '0; cur = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // align to a boundary
    while (!(mid_pulse || valley_pulse)) @(negedge clk);
    for (int h = 0; h < 200; h++) begin
      checks++;
      if (mid_pulse == valley_pulse || mid_pulse != second_half) begin
        failures++; $display("FAIL boundary pulses h=%0d", h);
      end
      sh = second_half;
      // reference for the next half
      cur = v_ref;
      v_ref.a = sample_t'(int'($urandom_range(0, 30000)) - 15000);
      v_ref.b = sample_t'(int'($urandom_range(0, 30000)) - 15000);
      v_ref.c = (h % 7 == 3) ? sample_t'(-30000) : sample_t'(int'($urandom_range(0, 30000)) - 15000);
      for (int k = 0; k < 3; k++) begin on[k] = 0; first_on[k] = -1; last_on[k] = -1; end
      for (int t = 0; t < HALF; t++) begin
        if (t > 0 && (mid_pulse || valley_pulse)) begin failures++; $display("FAIL early pulse"); end
        for (int k = 0; k < 3; k++) if (leg[k]) begin
          on[k]++;
          if (first_on[k] < 0) first_on[k] = t;
          last_on[k] = t;
        end
        @(negedge clk);
      end
      if (h > 0) begin
        sample_t vv [3];
        vv[0] = cur.a; vv[1] = cur.b; vv[2] = cur.c;
        for (int k = 0; k < 3; k++) begin
          int e;
          e = expect_on(vv[k]);
          checks += 2;
          if (on[k] - e > 1 || e - on[k] > 1) begin
            failures++; $display("FAIL h=%0d leg %0d on %0d expected %0d", h, k, on[k], e);
          end
          if (on[k] > 0 && ((sh && first_on[k] != 0) || (!sh && last_on[k] != HALF - 1) ||
                            (last_on[k] - first_on[k] + 1 != on[k]))) begin
            failures++; $display("FAIL h=%0d leg %0d not centred", h, k);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
