`timescale 1ns / 1ps
// Testbench for delay_match: drives the taps as a line that is too fast,
// too slow or inside the window, in 8- and 9-state mode, and checks the
// direction of each bias step, the carry between fine and coarse codes,
// the saturation and the locked flag.
module tb_delay_match;
  import mdpwm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic launched = 1'b0, blocked = 1'b0, lvl = 1'b0, mode9 = 1'b0;
  logic n28 = 1'b0, n28a = 1'b0, n31 = 1'b0, n32 = 1'b0;
  logic [CRS_W-1:0] coarse;
  logic [FIN_W-1:0] fine;
  logic locked;
  int checks = 0, failures = 0;

  delay_match dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // 0: too slow (no tap reached), 1: in window, 2: too fast (all reached)
  task automatic one_check(input int how);
    @(negedge clk); launched = 1'b1;
    @(negedge clk); launched = 1'b0; lvl = ~lvl;  // level after the launch edge
    n28  = (how >= 1) ? lvl : ~lvl;
    n31  = (how >= 1) ? lvl : ~lvl;
    n28a = (how == 2) ? lvl : ~lvl;
    n32  = (how == 2) ? lvl : ~lvl;
    @(negedge clk);
    n28 = lvl; n28a = lvl; n31 = lvl; n32 = lvl;
  endtask

  function automatic int code(input logic [CRS_W-1:0] c, input logic [FIN_W-1:0] f);
    return int'(c) * 16 + int'(f);
  endfunction

  initial begin
    int prev_code;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(coarse == 6'd32 && fine == 5'd16, "reset codes");
    for (int m = 0; m < 2; m++) begin
      mode9 = m[0];
      prev_code = code(coarse, fine);
      one_check(1);
      check(code(coarse, fine) == prev_code && locked, "hold inside window");
      one_check(0);
      check(code(coarse, fine) == prev_code + 1 && !locked, "too slow -> more current");
      one_check(2);
      check(code(coarse, fine) == prev_code, "too fast -> less current");
      // no check without a launch
      repeat (5) @(negedge clk);
      check(code(coarse, fine) == prev_code, "idle");
    end
    // a launch held back because the line is still busy: more current
    prev_code = code(coarse, fine);
    @(negedge clk) blocked = 1'b1;
    @(negedge clk) blocked = 1'b0;
    check(code(coarse, fine) == prev_code + 1 && !locked, "blocked launch -> more current");
    // run up across the fine/coarse carry: current strictly rising
    for (int k = 0; k < 40; k++) begin
      prev_code = code(coarse, fine);
      one_check(0);
      check(code(coarse, fine) == prev_code + 1, $sformatf("rising step %0d", k));
      check(fine >= 5'd1, "fine never wraps to 0 going up");
    end
    for (int k = 0; k < 40; k++) begin
      prev_code = code(coarse, fine);
      one_check(2);
      check(code(coarse, fine) == prev_code - 1, $sformatf("falling step %0d", k));
    end
    // saturation at the bottom
    for (int k = 0; k < 40 * 16; k++) one_check(2);
    check(coarse == '0 && fine == '0, "saturates at zero current");
    one_check(2);
    check(coarse == '0 && fine == '0, "stays at zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
