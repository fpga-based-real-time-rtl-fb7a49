// tb_test_signal_gen: steps the generator through PWM half periods and checks, for every
// half, the announced test vector (+DV with the new test in a second half, -DV with the same
// test in the following first half, tests alternating I, II), the reported finished pair,
// and that nothing is injected while the enable is low.
module tb_test_signal_gen;
  import pmsm_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, second_half = 0, mid_pulse = 0;
  angle_t th_o, th_i, th_ii;
  qd_t dv_o;
  logic done_pulse, done_sel, done_valid;
  int checks = 0, failures = 0;

  test_signal_gen dut (.clk, .rst_n, .en, .second_half, .mid_pulse, .th_o, .dv_o, .th_i,
                       .th_ii, .done_pulse, .done_sel, .done_valid);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_vec(input angle_t th, input int dv, input string what);
    checks++;
    if (dv_o.q != sample_t'(dv) || dv_o.d != '0 || (dv != 0 && th_o != th)) begin
      failures++;
      $display("FAIL %s: th=%0d dv=%0d expected th=%0d dv=%0d", what, th_o, dv_o.q, th, dv);
    end
  endtask

  initial begin
    int nexttest;     // 0: I, 1: II
    int cur;
    bit cur_en;
    repeat (3) @(negedge clk);
    rst_n = 1;
    checks += 2;
    if (th_i != angle_t'(0) || th_ii != angle_t'(65536)) begin failures++; $display("FAIL angles"); end
    @(negedge clk);
    // disabled: nothing injected
    expect_vec(th_i, 0, "disabled");
    en = 1;
    nexttest = 0; cur = 0; cur_en = 0;
    for (int p = 0; p < 12; p++) begin
      if (p == 8) en = 0;
      // first half: the upcoming second half starts a new pair with +DV
      @(negedge clk);
      expect_vec(nexttest ? th_ii : th_i, en ? 8192 : 0, "before mid");
      // mid boundary
      second_half = 1; mid_pulse = 1;
      @(negedge clk); mid_pulse = 0;
      checks++;
      if (!done_pulse || (p > 0 && (done_sel != cur[0] || done_valid != cur_en))) begin
        failures++;
        $display("FAIL done report p=%0d pulse=%b sel=%b valid=%b", p, done_pulse, done_sel, done_valid);
      end
      cur = nexttest; cur_en = en; nexttest ^= 1;
      // second half: the upcoming first half ends the pair with -DV
      expect_vec(cur ? th_ii : th_i, cur_en ? -8192 : 0, "after mid");
      repeat (3) @(negedge clk);
      second_half = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
