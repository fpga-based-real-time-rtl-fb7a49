// tb_rotary_tuner: turns a simulated encoder (FILT = 8, GMAX = 50) clockwise and
// counter-clockwise, with contact bounce (pulses shorter than the filter) around every edge,
// on each of the four gains. Checks the reset gains (0.47, 0.55, 0.23, 0.28), one 0.01 step
// per detent in the right direction, the limits at GMIN and GMAX, and gain = count * 164.
module tb_rotary_tuner;
  localparam int FILT = 8, GMAX = 50;
  logic clk = 0, rst_n = 0, enc_a = 0, enc_b = 0;
  logic [1:0] sel = '0;
  logic [7:0] count [4];
  logic [15:0] gain [4];
  logic step_up, step_dn;
  int checks = 0, failures = 0, ups = 0, dns = 0;

  rotary_tuner #(.FILT(FILT), .GMIN(0), .GMAX(GMAX)) dut (.clk, .rst_n, .enc_a, .enc_b, .sel,
                                                          .count, .gain, .step_up, .step_dn);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (step_up) ups++;
    if (step_dn) dns++;
  end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // move one encoder line to a new level with bounce first
  task automatic edge_to(input bit is_a, input bit lvl);
    for (int g = 0; g < 3; g++) begin
      if (is_a) enc_a = lvl; else enc_b = lvl;
      repeat ($urandom_range(1, FILT - 3)) @(negedge clk);
      if (is_a) enc_a = !lvl; else enc_b = !lvl;
      repeat ($urandom_range(1, FILT - 3)) @(negedge clk);
    end
    if (is_a) enc_a = lvl; else enc_b = lvl;
    repeat (3 * FILT) @(negedge clk);
  endtask

  task automatic detent(input bit cw);
    if (cw) begin edge_to(1, 1); edge_to(0, 1); edge_to(1, 0); edge_to(0, 0); end
    else    begin edge_to(0, 1); edge_to(1, 1); edge_to(0, 0); edge_to(1, 0); end
  endtask

  int model [4] = '{47, 55, 23, 28};

  task automatic check_all(input string what);
    for (int k = 0; k < 4; k++) begin
      checks += 2;
      if (count[k] != 8'(model[k])) begin failures++; $display("FAIL %s gain %0d count %0d exp %0d", what, k, count[k], model[k]); end
      if (gain[k] != 16'(model[k] * 164)) begin failures++; $display("FAIL %s gain value %0d", what, k); end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (4) @(negedge clk);
    check_all("reset");
    for (int s = 0; s < 4; s++) begin
      sel = 2'(s);
      for (int k = 0; k < 6; k++) begin
        detent(1);
        if (model[s] < GMAX) model[s]++;
        check_all("cw");
      end
      for (int k = 0; k < 60; k++) begin
        detent(0);
        if (model[s] > 0) model[s]--;
      end
      check_all("ccw");
      for (int k = 0; k < 3; k++) begin
        detent(1);
        if (model[s] < GMAX) model[s]++;
      end
      check_all("cw again");
    end
    checks++;
    if (ups != 36 || dns != 240) begin failures++; $display("FAIL step counts %0d %0d", ups, dns); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
