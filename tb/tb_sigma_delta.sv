`timescale 1ns / 1ps
// Testbench for sigma_delta: over any 8 consecutive steps the 8-bit words
// must add up to the 11-bit command (8*d[10:3] + d[2:0]), each word must
// be d[10:3] or d[10:3]+1, and the output saturates at 255.
module tb_sigma_delta;
  import mdpwm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, step = 1'b0;
  logic [D_W-1:0] d = '0;
  logic [DC_W-1:0] dc;
  int checks = 0, failures = 0;

  sigma_delta dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int sum, base;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      d = (t < 3) ? D_W'(t * 5 + 1) : D_W'($urandom_range(0, 2039));
      base = int'(d) / 8;
      sum = 0;
      // a few idle clocks between steps: state must only move on step
      for (int k = 0; k < 8; k++) begin
        @(negedge clk); step = 1'b0;
        @(negedge clk);
        check(dc == DC_W'(base) || dc == DC_W'(base + 1),
              $sformatf("d=%0d dc=%0d", d, dc));
        sum += int'(dc);
        step = 1'b1;
      end
      @(negedge clk); step = 1'b0;
      check(sum == int'(d), $sformatf("8-step sum %0d for d=%0d", sum, d));
    end
    // saturation
    d = 11'h7FF;
    for (int k = 0; k < 8; k++) begin
      @(negedge clk); step = 1'b1;
      check(dc == 8'hFF, "saturation at 255");
    end
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
