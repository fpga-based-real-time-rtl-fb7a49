// tb_pmsm_model: integrates the IPMSM current equations with forward Euler in real arithmetic
// (R = 0.5 ohm, Ld = 8 mH, Lq = 16 mH, dt = 2.5 us, bases 10 A / 100 V) alongside the model,
// over voltage steps with and without rotor speed, and compares the currents. Also checks
// that the outputs only change on the clock after an enable.
module tb_pmsm_model;
  import pmsm_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  qd_t v, i;
  logic signed [17:0] omega_dt;
  int checks = 0, failures = 0;

  pmsm_model dut (.clk, .rst_n, .en, .v, .omega_dt, .i);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam real DT = 2.5e-6, R = 0.5, LD = 8e-3, LQ = 16e-3;
  real iq = 0.0, id = 0.0;   // amperes

  task automatic phase(input real vq_pu, input real vd_pu, input real w, input int steps);
    real vq, vd, nq, nd;
    qd_t i_prev;
    v = '{q: sample_t'($rtoi(vq_pu * 8192.0)), d: sample_t'($rtoi(vd_pu * 8192.0))};
    omega_dt = 18'($rtoi(w * DT * 16777216.0));
    vq = real'(v.q) / 8192.0 * 100.0;
    vd = real'(v.d) / 8192.0 * 100.0;
    for (int s = 0; s < steps; s++) begin
      i_prev = i;
      @(negedge clk); en = 1;
      @(negedge clk); en = 0;
      nq = iq + DT * (vq / LQ - R / LQ * iq - w * LD / LQ * id);
      nd = id + DT * (vd / LD - R / LD * id + w * LQ / LD * iq);
      iq = nq; id = nd;
      repeat (2) @(negedge clk);
      if (s % 100 == 99) begin
        real eq, ed;
        eq = real'(i.q) / 8192.0 * 10.0 - iq;
        ed = real'(i.d) / 8192.0 * 10.0 - id;
        checks++;
        if (eq > 0.01 + 0.003 * ((iq < 0.0) ? -iq : iq) || eq < -0.01 - 0.003 * ((iq < 0.0) ? -iq : iq) ||
            ed > 0.01 + 0.003 * ((id < 0.0) ? -id : id) || ed < -0.01 - 0.003 * ((id < 0.0) ? -id : id)) begin
          failures++;
          $display("FAIL step %0d iq=%f (%f) id=%f (%f)", s, real'(i.q) / 819.2, iq,
                   real'(i.d) / 819.2, id);
        end
      end
    end
    // no enable: the output holds
    i_prev = i;
    repeat (20) @(negedge clk);
    checks++;
    if (i != i_prev) begin failures++; $display("FAIL output moved without enable"); end
  endtask

  initial begin
    v = '0; omega_dt = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    phase(0.5, -0.3, 0.0, 2000);
    phase(0.0, 0.0, 0.0, 1000);
    phase(0.2, 0.4, 300.0, 2000);
    phase(-0.6, 0.1, -500.0, 2000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
