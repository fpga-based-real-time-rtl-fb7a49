// tb_current_meas: feeds a known current waveform (a ramp per phase whose slope changes
// sign every half period, as a +dv/-dv test pair produces, plus a constant slope) and
// boundary pulses every 400 clocks with SAMPLE_DELAY = 30. Checks that the mid-period sample
// is the waveform value SAMPLE_DELAY clocks after the mid boundary and that d2 equals the
// second difference of the last three boundary samples, worked out here from the waveform.
module tb_current_meas;
  import pmsm_pkg::*;
  localparam int HALF = 400, SD = 30;
  logic clk = 0, rst_n = 0, boundary = 0, at_mid = 0;
  abc_t i_abc, i_mid, d2;
  logic d2_ok, mid_valid;
  int checks = 0, failures = 0;

  current_meas #(.SAMPLE_DELAY(SD)) dut (.clk, .rst_n, .boundary, .at_mid, .i_abc, .i_mid,
                                         .d2, .d2_ok, .mid_valid);

  always #5 clk = ~clk;

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // waveform at clock t: phase k = base slope + zig-zag of per-half slope sl[k]
  function automatic int wave(input int t, input int k);
    int h, r, z, sl;
    sl = 3 + 2 * k;
    h = t / HALF; r = t % HALF;
    z = (h % 2 == 0) ? sl * r : sl * (HALF - r);
    return (k - 1) * t / 8 + z - 600;
  endfunction

  int t = 0;
  always @(negedge clk) begin
    i_abc.a <= sample_t'(wave(t, 0));
    i_abc.b <= sample_t'(wave(t, 1));
    i_abc.c <= sample_t'(wave(t, 2));
  end

  initial begin
    int nmid = 0;
    int smp [3][3];  // per phase: sample at boundary n-2, n-1, n
    i_abc = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (t = 0; t < 14 * HALF; t++) begin
      boundary = (t % HALF == 0);
      at_mid = (t % HALF == 0) && ((t / HALF) % 2 == 1);
      @(negedge clk);
      if (mid_valid) begin
        int tm, e [3];
        sample_t gm [3], gd [3];
        tm = (t / HALF) * HALF;           // the mid boundary of this sample
        gm[0] = i_mid.a; gm[1] = i_mid.b; gm[2] = i_mid.c;
        gd[0] = d2.a; gd[1] = d2.b; gd[2] = d2.c;
        for (int k = 0; k < 3; k++) begin
          int sm, sv, sp;
          sm = wave(tm + SD, k);
          sv = wave(tm - HALF + SD, k);
          sp = wave(tm - 2 * HALF + SD, k);
          checks++;
          if (gm[k] != sample_t'(sm)) begin failures++; $display("FAIL mid sample phase %0d got %0d exp %0d", k, gm[k], sm); end
          if (nmid > 0) begin
            checks++;
            if (gd[k] != sample_t'(2 * sv - sp - sm)) begin
              failures++; $display("FAIL d2 phase %0d got %0d exp %0d", k, gd[k], 2 * sv - sp - sm);
            end
          end
        end
        checks++;
        if (d2_ok != (nmid > 0)) begin failures++; $display("FAIL d2_ok"); end
        nmid++;
      end
    end
    checks++;
    if (nmid != 7) begin failures++; $display("FAIL %0d mid samples", nmid); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
