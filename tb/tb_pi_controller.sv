// tb_pi_controller: runs the shared q/d PI controller against a reference PI written here
// (proportional plus integral with the integrator clamped to +-VLIM, the output limited to
// +-VLIM and the integrator frozen while the output is limited and the error pushes further).
// It drives small errors that settle and large ones that saturate, counts how often the
// anti-windup freeze happened, and checks that done comes 3 clocks after start. The speed
// input is random too, so the decoupling feed-forward (+w*Ld*i_d on q, -w*Lq*i_q on d, with
// Ld = 8 mH and Lq = 16 mH over 2.5 us in per-unit: 320 and 640) is checked as well; a third of
// the runs use zero speed.
module tb_pi_controller;
  import pmsm_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  qd_t i_ref, i_meas, v;
  logic [15:0] kp_q, ki_q, kp_d, ki_d;
  logic done, limited;
  logic signed [17:0] omega;
  int checks = 0, failures = 0, freezes = 0, limits = 0, ff_runs = 0;
  localparam longint VL = 4096;

  pi_controller dut (.clk, .rst_n, .start, .i_ref, .i_meas, .omega, .kp_q, .ki_q, .kp_d, .ki_d,
                     .v, .done, .limited);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint integ [2] = '{0, 0};

  function automatic longint fl(input longint a);   // floor(a / 2^14)
    return a >>> 14;
  endfunction

  task automatic ref_axis(input int ax, input longint e, input longint kp, input longint ki,
                          input longint ff, output longint u, output bit lim);
    longint p, inew, raw;
    p = fl(e * kp) + ff;
    inew = integ[ax] + fl(e * ki);
    if (inew > VL) inew = VL;
    if (inew < -VL) inew = -VL;
    raw = p + inew;
    lim = (raw > VL) || (raw < -VL);
    u = (raw > VL) ? VL : ((raw < -VL) ? -VL : raw);
    if ((raw > VL && e > 0) || (raw < -VL && e < 0)) freezes++;
    else integ[ax] = inew;
  endtask

  initial begin
    int n;
    longint uq, ud;
    bit lq, ld;
    longint ffq, ffd;
    i_ref = '0; i_meas = '0; omega = '0;
    kp_q = 16'd7708; ki_q = 16'd9020; kp_d = 16'd3772; ki_d = 16'd4592;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 400; k++) begin
      int span;
      span = (k % 50 < 25) ? 600 : 40000;
      i_ref  = '{q: sample_t'(int'($urandom_range(0, 2 * span)) - span),
                 d: sample_t'(int'($urandom_range(0, 2 * span)) - span)};
      i_meas = '{q: sample_t'(int'($urandom_range(0, 2 * span)) - span),
                 d: sample_t'(int'($urandom_range(0, 2 * span)) - span)};
      omega = (k % 3 == 0) ? 18'sd0 : 18'(int'($urandom_range(0, 8000)) - 4000);
      if (k % 100 == 60) begin kp_q = 16'($urandom_range(0, 32800)); ki_d = 16'($urandom_range(0, 32800)); end
      @(negedge clk); start = 1;
      @(negedge clk); start = 0; n = 1;
      while (!done) begin @(negedge clk); n++; end
      ffq = (longint'(omega) * longint'(i_meas.d) * 320) >>> 24;
      ffd = -((longint'(omega) * longint'(i_meas.q) * 640) >>> 24);
      ref_axis(0, longint'(i_ref.q) - longint'(i_meas.q), longint'(kp_q), longint'(ki_q), ffq, uq, lq);
      ref_axis(1, longint'(i_ref.d) - longint'(i_meas.d), longint'(kp_d), longint'(ki_d), ffd, ud, ld);
      checks += 4;
      if (n != 3) begin failures++; $display("FAIL latency %0d", n); end
      if (longint'(v.q) != uq) begin failures++; $display("FAIL k=%0d vq %0d exp %0d", k, v.q, uq); end
      if (longint'(v.d) != ud) begin failures++; $display("FAIL k=%0d vd %0d exp %0d", k, v.d, ud); end
      if (limited != (lq || ld)) begin failures++; $display("FAIL limited flag"); end
      if (lq || ld) limits++;
      if (!lq && !ld && (ffq > 8 || ffq < -8) && (ffd > 8 || ffd < -8)) ff_runs++;
    end
    checks += 2;
    if (freezes == 0) begin failures++; $display("FAIL anti-windup never exercised"); end
    if (limits == 0) begin failures++; $display("FAIL output limit never exercised"); end
    checks++;
    if (ff_runs == 0) begin failures++; $display("FAIL decoupling never visible"); end
    $display("anti-windup freezes=%0d limited runs=%0d decoupled runs=%0d", freezes, limits, ff_runs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
