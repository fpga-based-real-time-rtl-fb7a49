// tb_cordic_sincos: checks the 7-step CORDIC sine/cosine against real-valued $sin/$cos over
// the whole circle (fixed corner angles plus random ones), including the one-clock latency.
// Tolerance: 7 steps leave up to ~0.9 degrees of angle error, i.e. 0.016 pu, plus rounding.
module tb_cordic_sincos;
  import pmsm_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  angle_t theta;
  sample_t s, c;
  int checks = 0, failures = 0;

  cordic_sincos dut (.clk, .rst_n, .en, .theta, .sin_o(s), .cos_o(c));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(input angle_t a);
    real ph, es, ec;
    @(negedge clk);
    theta = a; en = 1;
    @(negedge clk);
    en = 0;
    ph = real'(a) * 2.0 * 3.14159265358979 / 262144.0;
    es = $sin(ph) * 8192.0;
    ec = $cos(ph) * 8192.0;
    checks += 2;
    if ((real'(s) - es) > 150.0 || (es - real'(s)) > 150.0 ||
        (real'(c) - ec) > 150.0 || (ec - real'(c)) > 150.0) begin
      failures++;
      $display("FAIL angle=%0d sin=%0d (%f) cos=%0d (%f)", a, s, es, c, ec);
    end
  endtask

  initial begin
    theta = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 16; k++) try(angle_t'(k * 16384));
    try(angle_t'(65535)); try(angle_t'(65536)); try(angle_t'(65537));
    try(angle_t'(-65536)); try(angle_t'(-65537)); try(angle_t'(131071));
    for (int k = 0; k < 500; k++) try(angle_t'($urandom));
    // output holds while en is low
    @(negedge clk); theta = angle_t'(65536); en = 1;
    @(negedge clk); en = 0; theta = '0;
    repeat (3) @(negedge clk);
    checks++;
    if (s < 8000) begin failures++; $display("FAIL hold"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
