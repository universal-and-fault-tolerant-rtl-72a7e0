`timescale 1ns / 1ps
// Switching-frequency range test of mdpwm (4 phases, default parameters).
// The clock is stepped from 80 MHz (10 MHz switching) to 1.2 MHz (150 kHz
// switching) and back, with a constant duty word. After each step the
// delay matching must re-lock on its own, and the pulse width must again
// be dc/256 of the period within 1.5 cells, with the four phases 90
// degrees apart. The number of periods the re-lock took is printed.
module tb_freq_range;
  import mdpwm_pkg::*;

  real tclk = 12.5;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [1:0] phase_sel = '0, phase_angle = '0;
  logic [N_PH-1:0] phase_enable = '0;
  logic [N_PH-1:0][D_W-1:0] d = '0;
  logic [N_PH-1:0] dpwm, locked;
  logic [R_W-1:0] r;
  logic wrap, mode9;
  int checks = 0, failures = 0;
  int n_relock = 0;

  mdpwm dut (.*);

  always #(tclk / 2.0) clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit near(input real a, input real b, input real tol);
    return (a - b < tol) && (b - a < tol);
  endfunction

  task automatic wait_lock(output int periods);
    periods = 0;
    // a few periods on, then until four checks in a row are inside the window
    repeat (4) @(posedge clk iff wrap);
    while (locked != '1) begin @(posedge clk iff wrap); periods++; end
    repeat (8) @(posedge clk iff wrap);
  endtask

  task automatic check_pwm(input int dc, input string what);
    realtime t0, t1;
    real ts = 8.0 * tclk;
    @(posedge dpwm[0]); t0 = $realtime;
    @(negedge dpwm[0]); t1 = $realtime;
    check(near(t1 - t0, real'(dc) / 256.0 * ts, 1.5 * ts / 256.0),
          $sformatf("%s: width %f ns, expected %f ns", what, t1 - t0, real'(dc) / 256.0 * ts));
    for (int i = 1; i < N_PH; i++) begin
      @(posedge dpwm[0]); t0 = $realtime;
      @(posedge dpwm[i]); t1 = $realtime;
      check(near(t1 - t0, 2.0 * i * tclk, 0.01), $sformatf("%s: phase %0d offset %f", what, i + 1, t1 - t0));
    end
    @(posedge dpwm[0]); t0 = $realtime;
    @(posedge dpwm[0]); t1 = $realtime;
    check(near(t1 - t0, ts, 0.01), $sformatf("%s: period %f ns", what, t1 - t0));
  endtask

  initial begin
    int p;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < N_PH; i++) begin
      @(negedge clk); phase_sel = 2'(i); phase_angle = 2'(i);
      @(negedge clk);
    end
    d = {4{11'd800}};                  // dc = 100: 3 counter steps + 4 cells
    phase_enable = '1;
    wait_lock(p);
    $display("lock at 80 MHz after %0d periods", p);
    check_pwm(100, "10 MHz");
    tclk = 833.333;                    // 1.2 MHz clock
    wait_lock(p);
    n_relock++;
    $display("re-lock at 1.2 MHz after %0d periods", p);
    check_pwm(100, "150 kHz");
    tclk = 12.5;
    wait_lock(p);
    n_relock++;
    $display("re-lock at 80 MHz after %0d periods", p);
    check_pwm(100, "10 MHz again");
    check(n_relock == 2, "both frequency steps re-locked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
