// tb_cordic_atan2: checks the 11-step CORDIC ATAN2 against real-valued $atan2 in all four
// quadrants and on the axes, and that done comes exactly ITER+1 = 12 clocks after start.
module tb_cordic_atan2;
  import pmsm_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  sample_t y, x;
  logic busy, done;
  angle_t ang;
  int checks = 0, failures = 0;

  cordic_atan2 dut (.clk, .rst_n, .start, .y_i(y), .x_i(x), .busy, .done, .angle_o(ang));

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(input int yy, input int xx);
    real e, d;
    int n;
    @(negedge clk);
    y = sample_t'(yy); x = sample_t'(xx); start = 1;
    @(negedge clk);
    start = 0;
    n = 1;
    while (!done) begin @(negedge clk); n++; end
    e = $atan2(real'(yy), real'(xx)) * 262144.0 / (2.0 * 3.14159265358979);
    d = real'(ang) - e;
    if (d > 131072.0) d -= 262144.0;
    if (d < -131072.0) d += 262144.0;
    checks += 2;
    if (d > 120.0 || d < -120.0) begin
      failures++;
      $display("FAIL y=%0d x=%0d angle=%0d expected %f", yy, xx, ang, e);
    end
    if (n != 12) begin
      failures++;
      $display("FAIL latency %0d", n);
    end
  endtask

  initial begin
    y = 0; x = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    try(0, 5000); try(5000, 0); try(0, -5000); try(-5000, 0);
    try(4000, 4000); try(-4000, -4000); try(3000, -7000); try(-100000, 30000);
    for (int k = 0; k < 400; k++) begin
      int a, b;
      a = int'($urandom_range(0, 200000)) - 100000;
      b = int'($urandom_range(0, 200000)) - 100000;
      if ((a > 3000 || a < -3000) || (b > 3000 || b < -3000)) try(a, b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
