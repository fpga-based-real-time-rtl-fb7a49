// tb_voltage_modulator: drives random leg patterns (including all-on and all-off intervals)
// and checks that each interval's output equals Vdc/3 * (2 s_a - s_b - s_c) averaged over
// the interval (Vdc = 3 pu, N = 100 clocks), within one LSB, and that valid follows each
// interval end.
module tb_voltage_modulator;
  import pmsm_pkg::*;
  logic clk = 0, rst_n = 0, frame_end = 0;
  logic [2:0] leg = '0;
  abc_t v_abc;
  logic valid;
  int checks = 0, failures = 0;

  voltage_modulator dut (.clk, .rst_n, .leg, .frame_end, .v_abc, .valid);

  always #5 clk = ~clk;

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real acc [3];
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 150; f++) begin
      int mode;
      mode = f % 5;
      for (int k = 0; k < 3; k++) acc[k] = 0.0;
      for (int t = 0; t < 100; t++) begin
        if (mode == 0)      leg = 3'b111;
        else if (mode == 1) leg = (t < 37) ? 3'b001 : 3'b110;
        else                leg = 3'($urandom);
        frame_end = (t == 99);
        acc[0] += (2.0 * leg[0] - leg[1] - leg[2]);
        acc[1] += (2.0 * leg[1] - leg[0] - leg[2]);
        acc[2] += (2.0 * leg[2] - leg[0] - leg[1]);
        @(negedge clk);
        checks++;
        if (valid != (t == 99)) begin failures++; $display("FAIL valid f=%0d t=%0d", f, t); end
      end
      frame_end = 0;
      begin
        sample_t got [3];
        got[0] = v_abc.a; got[1] = v_abc.b; got[2] = v_abc.c;
        for (int k = 0; k < 3; k++) begin
          real e;
          e = acc[k] / 100.0 * 8192.0;   // Vdc/3 = 1 pu
          checks++;
          if (real'(got[k]) - e > 1.5 || e - real'(got[k]) > 1.5) begin
            failures++; $display("FAIL f=%0d phase %0d got %0d expected %f", f, k, got[k], e);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
