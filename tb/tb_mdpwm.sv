`timescale 1ns / 1ps
// Testbench for mdpwm at a 40 MHz clock. Checks, after locking:
//  * 4 phases, slots 0..3: period 8 clocks, starts 2/4/6 clocks after
//    phase 1 (90 degrees), widths dc/256 of the period;
//  * 3 phases: period 9 clocks, starts 3/6 clocks apart (120 degrees);
//  * 2 phases: starts 4 clocks apart (180 degrees);
//  * independent duty ratios per phase (multi-output use).
module tb_mdpwm;
  import mdpwm_pkg::*;

  localparam real TCLK = 25.0;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [1:0] phase_sel = '0, phase_angle = '0;
  logic [N_PH-1:0] phase_enable = '0;
  logic [N_PH-1:0][D_W-1:0] d = '0;
  logic [N_PH-1:0] dpwm, locked;
  logic [R_W-1:0] r;
  logic wrap, mode9;
  int checks = 0, failures = 0;

  mdpwm dut (.*);

  always #(TCLK / 2.0) clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic write_slot(input int p, input int k);
    @(negedge clk); phase_sel = 2'(p); phase_angle = 2'(k);
    @(negedge clk);
  endtask

  function automatic bit near(input real a, input real b, input real tol);
    return (a - b < tol) && (b - a < tol);
  endfunction

  // start of phase i relative to phase 1
  task automatic rel_start(input int i, output real dt);
    realtime t0;
    @(posedge dpwm[0]);
    t0 = $realtime;
    @(posedge dpwm[i]);
    dt = $realtime - t0;
  endtask

  task automatic width(input int i, output real w);
    realtime t0;
    @(posedge dpwm[i]);
    t0 = $realtime;
    @(negedge dpwm[i]);
    w = $realtime - t0;
  endtask

  task automatic period(input int i, output real p);
    realtime t0;
    @(posedge dpwm[i]);
    t0 = $realtime;
    @(posedge dpwm[i]);
    p = $realtime - t0;
  endtask

  initial begin
    real dt, w, p;
    int dcs [4] = '{40, 100, 170, 230};
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 4; i++) write_slot(i, i);
    d = {4{11'd1024}};
    phase_enable = 4'b1111;
    repeat (150) @(posedge dpwm[0]);
    check(locked == 4'b1111, "all delay lines locked");
    period(0, p);
    check(near(p, 8.0 * TCLK, 0.01), $sformatf("4-phase period %f", p));
    for (int i = 1; i < 4; i++) begin
      rel_start(i, dt);
      check(near(dt, 2.0 * i * TCLK, 0.01), $sformatf("4-phase start of phase %0d: %f", i + 1, dt));
    end
    for (int i = 0; i < 4; i++) begin
      width(i, w);
      check(near(w, 100.0, 1.5 * 200.0 / 256.0), $sformatf("4-phase width %0d: %f", i + 1, w));
    end
    // independent duty ratios
    for (int i = 0; i < 4; i++) d[i] = D_W'(dcs[i] * 8);
    repeat (3) @(posedge dpwm[0]);
    for (int i = 0; i < 4; i++) begin
      width(i, w);
      check(near(w, real'(dcs[i]) / 256.0 * 200.0, 1.5 * 200.0 / 256.0),
            $sformatf("independent width %0d: %f", i + 1, w));
    end
    // three phases
    d = {4{11'd1024}};
    write_slot(3, 0);
    phase_enable = 4'b0111;
    repeat (150) @(posedge dpwm[0]);
    check(mode9 && locked[2:0] == 3'b111, "9-state mode, locked");
    period(0, p);
    check(near(p, 9.0 * TCLK, 0.01), $sformatf("3-phase period %f", p));
    for (int i = 1; i < 3; i++) begin
      rel_start(i, dt);
      check(near(dt, 3.0 * i * TCLK, 0.01), $sformatf("3-phase start of phase %0d: %f", i + 1, dt));
    end
    width(1, w);
    // dc = 128: N_cn = 4, N_dl = 14 -> 4/9 + 14/256 of 225 ns
    check(near(w, (4.0 / 9.0 + 14.0 / 256.0) * 225.0, 1.5 * 225.0 / 256.0),
          $sformatf("3-phase width %f", w));
    check(dpwm[3] == 1'b0, "disabled phase silent");
    // two phases
    phase_enable = 4'b0011;
    repeat (150) @(posedge dpwm[0]);
    check(!mode9, "back to 8 states");
    rel_start(1, dt);
    check(near(dt, 4.0 * TCLK, 0.01), $sformatf("2-phase start %f", dt));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
