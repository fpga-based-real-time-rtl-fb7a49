// tb_shared_transform: loads random operands into all four Park and three inverse Park slots,
// runs the shared unit and compares every output with a real-valued Park / inverse Park
// computed here (q axis at theta, d axis leading by 90 degrees, amplitude invariant).
// Also checks that done comes 16 clocks after start and that a second start while busy is
// ignored. Tolerance covers the 7-step CORDIC (about 1.6 % of the vector length).
module tb_shared_transform;
  import pmsm_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  abc_t ct_x [4]; angle_t ct_th [4];
  qd_t ict_x [3]; angle_t ict_th [3];
  qd_t ct_y [4]; abc_t ict_y [3];
  logic busy, done;
  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979;

  shared_transform dut (.clk, .rst_n, .start, .ct_x, .ct_th, .ict_x, .ict_th,
                        .ct_y, .ict_y, .busy, .done);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real ang(input angle_t a);
    return real'(a) * 2.0 * PI / 262144.0;
  endfunction

  task automatic cmp(input string what, input sample_t got, input real exp);
    checks++;
    if (real'(got) - exp > 260.0 || exp - real'(got) > 260.0) begin
      failures++;
      $display("FAIL %s got %0d expected %f", what, got, exp);
    end
  endtask

  int n;
  initial begin
    for (int k = 0; k < 4; k++) begin ct_x[k] = '0; ct_th[k] = '0; end
    for (int k = 0; k < 3; k++) begin ict_x[k] = '0; ict_th[k] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 60; run++) begin
      for (int k = 0; k < 4; k++) begin
        int a, b;
        a = int'($urandom_range(0, 16000)) - 8000;
        b = int'($urandom_range(0, 16000)) - 8000;
        ct_x[k] = '{a: sample_t'(a), b: sample_t'(b), c: sample_t'(-a - b)};
        ct_th[k] = angle_t'($urandom);
      end
      for (int k = 0; k < 3; k++) begin
        ict_x[k] = '{q: sample_t'(int'($urandom_range(0, 16000)) - 8000),
                     d: sample_t'(int'($urandom_range(0, 16000)) - 8000)};
        ict_th[k] = angle_t'($urandom);
      end
      @(negedge clk); start = 1;
      @(negedge clk); start = 0; n = 1;
      if (run == 0) begin @(negedge clk); start = 1; @(negedge clk); start = 0; n += 2; end
      while (!done) begin @(negedge clk); n++; end
      checks++;
      if (n != 16) begin failures++; $display("FAIL latency %0d", n); end
      for (int k = 0; k < 4; k++) begin
        real al, be, th;
        al = (2.0 * real'(ct_x[k].a) - real'(ct_x[k].b) - real'(ct_x[k].c)) / 3.0;
        be = (real'(ct_x[k].b) - real'(ct_x[k].c)) / $sqrt(3.0);
        th = ang(ct_th[k]);
        cmp($sformatf("CT%0d.q", k + 1), ct_y[k].q, al * $cos(th) + be * $sin(th));
        cmp($sformatf("CT%0d.d", k + 1), ct_y[k].d, -al * $sin(th) + be * $cos(th));
      end
      for (int k = 0; k < 3; k++) begin
        real q, d, th, al, be;
        q = real'(ict_x[k].q); d = real'(ict_x[k].d); th = ang(ict_th[k]);
        al = q * $cos(th) - d * $sin(th);
        be = q * $sin(th) + d * $cos(th);
        cmp($sformatf("ICT%0d.a", k + 1), ict_y[k].a, al);
        cmp($sformatf("ICT%0d.b", k + 1), ict_y[k].b, -al / 2.0 + $sqrt(3.0) / 2.0 * be);
        cmp($sformatf("ICT%0d.c", k + 1), ict_y[k].c, -al / 2.0 - $sqrt(3.0) / 2.0 * be);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
