`timescale 1ns / 1ps
// Testbench for the deadtime model: for several codes, checks the delay
// of both turn-on edges, the immediate turn-off edges and that c and c_n
// are never high together.
module tb_deadtime;
  import mdpwm_pkg::*;

  logic dpwm = 1'b0;
  logic [DT_W-1:0] dt_code = '0;
  logic c, c_n;
  int checks = 0, failures = 0;
  bit overlap = 1'b0;

  deadtime dut (.*);

  always @(c or c_n) if (c && c_n) overlap = 1'b1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic near(input realtime t, input real exp, input string what);
    real dt = t - exp;
    if (dt < 0.0) dt = -dt;
    check(dt < 0.002, $sformatf("%s: %f, expected %f", what, t, exp));
  endtask

  initial begin
    realtime t0;
    #50;
    for (int k = 1; k < 16; k += 3) begin
      dt_code = DT_W'(k);
      #100;
      check(!c && c_n, "idle low: rectifier on");
      t0 = $realtime; dpwm = 1'b1;
      #0.001 check(!c && !c_n, "both off inside dead time");
      @(posedge c);
      near($realtime - t0, real'(k), $sformatf("c turn-on delay code %0d", k));
      #100;
      t0 = $realtime; dpwm = 1'b0;
      #0.001 check(!c && !c_n, "c off at once");
      @(posedge c_n);
      near($realtime - t0, real'(k), $sformatf("c_n turn-on delay code %0d", k));
    end
    check(!overlap, "no shoot-through");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
