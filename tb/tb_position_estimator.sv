// tb_position_estimator: for rotor angles spread over a half turn (the estimate is defined
// modulo pi) it computes the xy current responses of test vectors I (at alpha_I) and II
// (turned by 90 degrees) from the inductance model di_x = K(S - D cos 2g), di_y = K D sin 2g
// written here, feeds them in as the Park outputs would arrive, and checks the estimated
// angle. It also checks the response registers, that no estimate starts before a full
// transformation run has followed response II, and that response II alone (without I) is
// not used. For the speed output it checks that the first estimate gives none and that each
// later one equals the change of the estimate (modulo 180 degrees) over two PWM periods,
// 250 us, expressed as speed times 2.5 us with 24 fraction bits and limited to 18 bits.
module tb_position_estimator;
  import pmsm_pkg::*;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0, store = 0, store_sel = 0, tr_start = 0, tr_done = 0;
  abc_t d2, resp_i, resp_ii;
  qd_t xy_i, xy_ii;
  angle_t alpha_i, theta_est;
  logic est_valid;
  logic signed [17:0] omega_est;
  real prev_deg = 0.0;
  bit  have_prev = 0;
  int checks = 0, failures = 0;

  position_estimator dut (.clk, .rst_n, .store, .store_sel, .d2, .resp_i, .resp_ii,
                          .tr_start, .tr_done, .xy_i, .xy_ii, .alpha_i, .theta_est, .est_valid, .omega_est);

  always #5 clk = ~clk;

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic qd_t resp(input real g);
    real s, dd;
    s = 1500.0; dd = 500.0;     // (Lq+Ld) and (Lq-Ld) terms, arbitrary scale
    return '{q: sample_t'($rtoi(s - dd * $cos(2.0 * g))), d: sample_t'($rtoi(dd * $sin(2.0 * g)))};
  endfunction

  task automatic pulse(ref logic s);
    @(negedge clk); s = 1; @(negedge clk); s = 0;
  endtask

  task automatic one(input real th_deg, input real a_deg, input bit with_i);
    real th, a, e, d, cur, dd, w;
    int n;
    th = th_deg * PI / 180.0; a = a_deg * PI / 180.0;
    alpha_i = angle_t'($rtoi(a / (2.0 * PI) * 262144.0));
    // the q axis at th; gamma = angle of the test vector from the q axis
    xy_i  = resp(a - th);
    xy_ii = resp(a + PI / 2.0 - th);
    d2 = '{a: sample_t'($urandom_range(0, 999)), b: sample_t'(7), c: sample_t'(-3)};
    if (with_i) begin
      store_sel = 0; pulse(store);
      checks++;
      if (resp_i != d2) begin failures++; $display("FAIL resp_i"); end
    end
    store_sel = 1; pulse(store);
    checks++;
    if (resp_ii != d2) begin failures++; $display("FAIL resp_ii"); end
    // a done without a preceding start must not trigger
    pulse(tr_done);
    repeat (20) @(negedge clk);
    checks++;
    if (est_valid) begin failures++; $display("FAIL early estimate"); end
    pulse(tr_start);
    repeat (5) @(negedge clk);
    pulse(tr_done);
    n = 0;
    while (!est_valid && n < 40) begin @(negedge clk); n++; end
    checks++;
    if (!with_i) begin
      if (n < 40) begin failures++; $display("FAIL estimate without test I"); end
      return;
    end
    if (n >= 40) begin failures++; $display("FAIL no estimate"); return; end
    e = th_deg;
    while (e >= 90.0) e -= 180.0;
    while (e < -90.0) e += 180.0;
    d = real'(theta_est) * 360.0 / 262144.0 - e;
    if (d > 90.0) d -= 180.0;
    if (d < -90.0) d += 180.0;
    checks++;
    if (d > 0.3 || d < -0.3) begin
      failures++; $display("FAIL theta %f alpha %f: estimate %f deg", th_deg, a_deg, real'(theta_est) * 360.0 / 262144.0);
    end
    cur = real'(theta_est) * 360.0 / 262144.0;
    checks++;
    if (have_prev) begin
      dd = cur - prev_deg;
      while (dd >= 90.0) dd -= 180.0;
      while (dd < -90.0) dd += 180.0;
      w = dd * PI / 180.0 / 100.0 * 16777216.0;
      if (w > 131071.0) w = 131071.0;
      if (w < -131072.0) w = -131072.0;
      d = real'(omega_est) - w;
      if (d > 2.0 + 0.001 * (w < 0 ? -w : w) || d < -2.0 - 0.001 * (w < 0 ? -w : w)) begin
        failures++; $display("FAIL omega %0d expected %f", omega_est, w);
      end
    end else if (omega_est != 0) begin
      failures++; $display("FAIL speed from the first estimate");
    end
    prev_deg = cur; have_prev = 1;
  endtask

  initial begin
    d2 = '0; xy_i = '0; xy_ii = '0; alpha_i = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = -18; k < 18; k++) one(real'(k) * 5.0 + 1.3, 0.0, 1);
    one(33.0, 40.0, 1);
    one(-70.0, 200.0, 1);
    one(12.0, 0.0, 0);
    one(12.0, 0.0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
