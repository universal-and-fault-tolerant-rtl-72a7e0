`timescale 1ns / 1ps
// Testbench for mmu: a reference 8-clock period drives wrap. Records the
// slot written for each phase through phase_sel/phase_angle and checks it
// after each reconfiguration: four phases (0..3), phase 4 failed (0,1,2),
// phase 2 failed as well (0,-,1), cleared again. Also checks the
// immediate shutdown, the compensator enables per mode and the ADC and
// PID strobe timing.
module tb_mmu;
  import mdpwm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  op_mode_e mode = MODE_INTERLEAVED;
  logic [N_PH-1:0] phase_req = '0, ocp = '0;
  logic ocp_clear = 1'b0, wrap;
  logic [N_PH-1:0] phase_enable, comp_en, adc_clk, pid_clk;
  logic [1:0] phase_sel, phase_angle;
  logic refreshing;
  logic [2:0] cnt;
  logic [1:0] written [N_PH];
  int checks = 0, failures = 0;
  int refresh_events = 0;

  mmu dut (.*);

  always #5 clk = ~clk;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) cnt <= '0; else cnt <= cnt + 1'b1;
  assign wrap = (cnt == 3'd7);

  // model of the slot register file written by the unit
  always_ff @(posedge clk) written[phase_sel] <= phase_angle;

  always @(posedge refreshing) refresh_events++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic settle();
    repeat (3) @(posedge clk);
    while (refreshing) @(posedge clk);
    repeat (2) @(posedge clk);
    #1;
  endtask

  task automatic check_slots(input logic [N_PH-1:0] en, input int exp [4]);
    for (int p = 0; p < N_PH; p++)
      if (en[p]) check(written[p] == 2'(exp[p]),
                       $sformatf("slot of phase %0d is %0d, expected %0d", p, written[p], exp[p]));
  endtask

  initial begin
    int t_adc, t_wrap;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    phase_req = 4'b1111;
    settle();
    check(phase_enable == 4'b1111, "all four phases on");
    check_slots(4'b1111, '{0, 1, 2, 3});
    check(comp_en == 4'b0001, "interleaved: compensator 1 only");
    // strobes: adc one clock after the wrap edge, pid one clock later
    do begin @(posedge clk); #1; end while (!wrap);
    @(posedge clk); #1;
    check(adc_clk == 4'b0001 && pid_clk == 4'b0000, "adc strobe after wrap");
    @(posedge clk); #1;
    check(adc_clk == 4'b0000 && pid_clk == 4'b0001, "pid strobe one clock later");
    @(posedge clk); #1;
    check(pid_clk == 4'b0000, "strobes are one clock long");
    // over-current on phase 4
    @(negedge clk) ocp = 4'b1000;
    @(negedge clk) ocp = 4'b0000;
    @(posedge clk); #1;
    check(phase_enable == 4'b0111, "phase 4 shut down at once");
    settle();
    check(phase_enable == 4'b0111, "phase 4 stays off");
    check_slots(4'b0111, '{0, 1, 2, 0});
    // a second failure: phase 2
    @(negedge clk) ocp = 4'b0010;
    @(negedge clk) ocp = 4'b0000;
    settle();
    check(phase_enable == 4'b0101, "two phases left");
    check_slots(4'b0101, '{0, 0, 1, 0});
    // multi-output mode: one compensator per enabled phase
    mode = MODE_MULTI;
    #1 check(comp_en == 4'b0101, "multi-output compensators follow the phases");
    // clear the faults
    @(negedge clk) ocp_clear = 1'b1;
    @(negedge clk) ocp_clear = 1'b0;
    settle();
    check(phase_enable == 4'b1111, "faults cleared");
    check_slots(4'b1111, '{0, 1, 2, 3});
    check(comp_en == 4'b1111, "four compensators");
    do begin @(posedge clk); #1; end while (!wrap);
    @(posedge clk); #1;
    check(adc_clk == 4'b1111, "four ADC strobes");
    check(refresh_events == 4, $sformatf("refresh count %0d", refresh_events));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
