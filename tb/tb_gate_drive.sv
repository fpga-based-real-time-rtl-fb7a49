// tb_gate_drive: toggles the three leg states at random intervals (some shorter than the
// dead time) with DT = 8 and checks with a model written here that each switch command is on
// exactly when its leg state has been stable for DT clocks, that the two switches of a leg
// are never on together, and that every leg passes through a dead time.
module tb_gate_drive;
  localparam int DT = 8;
  logic clk = 0, rst_n = 0;
  logic [2:0] leg = '0, gate_hi, gate_lo;
  int checks = 0, failures = 0, deadtimes = 0;

  gate_drive #(.DT(DT)) dut (.clk, .rst_n, .leg, .gate_hi, .gate_lo);

  always #5 clk = ~clk;

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // age[k]: clocks the leg state seen by the DUT has been unchanged
  int age [3];
  logic [2:0] prev;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    prev = leg;
    for (int k = 0; k < 3; k++) age[k] = 0;
    for (int t = 0; t < 20000; t++) begin
      if ($urandom_range(0, 11) == 0) leg[$urandom_range(0, 2)] ^= 1'b1;
      @(posedge clk);
      // model of the registered outputs after this edge
      for (int k = 0; k < 3; k++) begin
        if (leg[k] != prev[k]) age[k] = 0;
        else age[k]++;
      end
      prev = leg;
      @(negedge clk);
      for (int k = 0; k < 3; k++) begin
        bit eh, el;
        eh = (age[k] >= DT) && leg[k];
        el = (age[k] >= DT) && !leg[k];
        checks++;
        if (gate_hi[k] != eh || gate_lo[k] != el) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d leg %0d hi=%b lo=%b expected %b %b", t, k, gate_hi[k], gate_lo[k], eh, el);
        end
        if (gate_hi[k] && gate_lo[k]) begin failures++; $display("FAIL shoot-through"); end
        if (!gate_hi[k] && !gate_lo[k] && t > 2 * DT) deadtimes++;
      end
    end
    checks++;
    if (deadtimes == 0) begin failures++; $display("FAIL no dead time seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
