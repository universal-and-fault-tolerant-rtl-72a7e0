`timescale 1ns / 1ps
// Testbench for prog_counter: checks the 0..7 ramp, the 0..8 ramp with
// mode9, the wrap flag and the period length in clocks.
module tb_prog_counter;
  import mdpwm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, mode9 = 1'b0;
  logic [R_W-1:0] r;
  logic wrap;
  int checks = 0, failures = 0;

  prog_counter dut (.clk, .rst_n, .mode9, .r, .wrap);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run_periods(input int last, input int n);
    for (int p = 0; p < n; p++) begin
      for (int k = 0; k <= last; k++) begin
        check(r == R_W'(k), $sformatf("r=%0d expected %0d", r, k));
        check(wrap == (k == last), $sformatf("wrap at r=%0d", r));
        @(posedge clk); #1;
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    run_periods(7, 3);
    mode9 = 1'b1;       // changed at r == 0, as the synchronization block does
    run_periods(8, 3);
    mode9 = 1'b0;
    run_periods(7, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
