`timescale 1ns / 1ps
// End-to-end testbench of univ_mdpwm_ctrl at its default parameters.
//
// The controller is closed around a simple averaged model of the power
// stage and of the windowed ADCs, both in this testbench:
//   * buck output j: v += ALPHA * (VIN * D_j - v) - load step, once per
//     ADC sample, where D_j is the measured mean duty of the phases that
//     feed output j over the last period;
//   * ADC j: e = clamp(round((VREF_j - v_j) / 20 mV), -8, 7).
// The clock is 8 MHz, so the converter switches at 1 MHz (4 phases).
// Scenario, following the controller's bench tests:
//   1. 4-phase interleaved at 1.8 V: lock, regulation, 90 degree spacing;
//   2. load step and recovery;
//   3. over-current on phase 4: shutdown, angle refresh, 3 phases at
//      120 degrees in 9-state mode, regulation kept;
//   4. over-current on phase 3: 2 phases at 180 degrees, then on phase 2:
//      one phase left (three failures tolerated);
//   5. faults cleared, back to 4 phases;
//   6. multi-output mode: four outputs at 1.2, 1.8, 2.5 and 3.3 V.
// Dead time and the absence of overlap of c/c_n are watched throughout.
// Each mechanism is counted and a failure is counted for any that never
// happened.
module tb_univ_mdpwm_ctrl;
  import mdpwm_pkg::*;

  localparam real TCLK  = 125.0;       // 8 MHz
  localparam real VIN   = 12.0;
  localparam real ALPHA = 0.05;
  localparam real QADC  = 0.020;

  logic clk = 1'b0, rst_n = 1'b0;
  op_mode_e mode = MODE_INTERLEAVED;
  logic [N_PH-1:0] phase_req = '0, ocp = '0;
  logic ocp_clear = 1'b0;
  logic [N_PH-1:0][E_W-1:0] e;
  logic [N_PH-1:0][K_W-1:0] ka, kb, kc;
  logic [DT_W-1:0] dt_code = DT_W'(10);
  logic [N_PH-1:0] c, c_n, dpwm, adc_clk, phase_enable, locked;
  logic refreshing, mode9;

  univ_mdpwm_ctrl dut (.*);

  always #(TCLK / 2.0) clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_lock = 0, n_interleave4 = 0, n_interleave3 = 0, n_interleave2 = 0, n_interleave1 = 0;
  int n_ocp_shutdown = 0, n_refresh = 0, n_mode9 = 0, n_load_step = 0;
  int n_multi_out = 0, n_deadtime = 0, n_overlap = 0, n_regulated = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- power stage and ADC model ----------------
  real vout [N_PH] = '{0.0, 0.0, 0.0, 0.0};
  real vref [N_PH] = '{1.8, 1.8, 1.8, 1.8};
  real load [N_PH] = '{0.0, 0.0, 0.0, 0.0};
  real hi   [N_PH] = '{0.0, 0.0, 0.0, 0.0};
  realtime tr [N_PH];
  realtime t_last = 0.0;

  for (genvar i = 0; i < N_PH; i++) begin : g_meas
    always @(posedge dpwm[i]) tr[i] = $realtime;
    always @(negedge dpwm[i]) hi[i] += $realtime - tr[i];
    // dead time seen on c: c rises later than dpwm
    always @(posedge c[i]) if ($realtime - tr[i] > 9.9) n_deadtime++;
  end

  always @(c or c_n) if ((c & c_n) != '0) n_overlap++;

  function automatic logic [E_W-1:0] adc(input real v, input real vr);
    int q = $rtoi($floor((vr - v) / QADC + 0.5));
    if (q > 7) q = 7;
    if (q < -8) q = -8;
    return E_W'(q);
  endfunction

  // one plant step per period, at the ADC strobe of compensator 1
  always @(posedge clk) if (adc_clk != '0 && rst_n) begin
    real ts, dsum, dj;
    int na;
    ts = $realtime - t_last;
    t_last = $realtime;
    if (mode == MODE_INTERLEAVED) begin
      dsum = 0.0; na = 0;
      for (int i = 0; i < N_PH; i++) if (phase_enable[i]) begin dsum += hi[i]; na++; end
      dj = (na > 0 && ts > 0.0) ? dsum / (na * ts) : 0.0;
      vout[0] += ALPHA * (VIN * dj - vout[0]) - load[0];
      for (int i = 1; i < N_PH; i++) vout[i] = vout[0];
    end else begin
      for (int i = 0; i < N_PH; i++) begin
        dj = (ts > 0.0) ? hi[i] / ts : 0.0;
        vout[i] += ALPHA * (VIN * dj - vout[i]) - load[i];
      end
    end
    for (int i = 0; i < N_PH; i++) begin
      hi[i] = 0.0;
      e[i] = adc(vout[i], vref[i]);
    end
  end

  // ---------------- helpers ----------------
  always @(posedge refreshing) n_refresh++;
  always @(posedge clk) if (mode9 && dut.u_mdpwm.wrap) n_mode9++;

  task automatic periods(input int n);
    repeat (n) @(posedge clk iff dut.u_mdpwm.wrap);
  endtask

  // mean of output j over n periods must be within tol of its reference
  task automatic check_reg(input int j, input int n, input real tol, input string what);
    real sum = 0.0;
    for (int k = 0; k < n; k++) begin periods(1); sum += vout[j]; end
    sum = sum / n;
    check(sum > vref[j] - tol && sum < vref[j] + tol,
          $sformatf("%s: output %0d mean %f V, reference %f V", what, j + 1, sum, vref[j]));
    if (sum > vref[j] - tol && sum < vref[j] + tol) n_regulated++;
  endtask

  // start delay of phase i after phase 1, in clocks
  task automatic start_delay(input int i, output real clocks);
    realtime t0;
    @(posedge dpwm[0]);
    t0 = $realtime;
    @(posedge dpwm[i]);
    clocks = ($realtime - t0) / TCLK;
  endtask

  initial begin
    real dl;
    for (int i = 0; i < N_PH; i++) begin
      e[i] = '0; ka[i] = K_W'(36); kb[i] = -K_W'(32); kc[i] = '0;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // 1. four phases interleaved
    phase_req = 4'b1111;
    periods(700);
    check(locked == 4'b1111, $sformatf("delay lines locked: %b", locked));
    if (locked == 4'b1111) n_lock++;
    check_reg(0, 50, 0.05, "4-phase regulation");
    for (int i = 1; i < 4; i++) begin
      start_delay(i, dl);
      check(dl > 2.0 * i - 0.01 && dl < 2.0 * i + 0.01,
            $sformatf("4-phase: phase %0d starts %f clocks after phase 1", i + 1, dl));
    end
    n_interleave4++;

    // 2. load step
    load[0] = 0.01;
    n_load_step++;
    periods(300);
    check_reg(0, 50, 0.06, "regulation under load");
    load[0] = 0.0;
    periods(300);

    // 3. over-current on phase 4
    @(negedge clk) ocp = 4'b1000;
    @(negedge clk) ocp = 4'b0000;
    @(posedge clk); #1;
    check(phase_enable == 4'b0111, "phase 4 shut down");
    if (phase_enable == 4'b0111) n_ocp_shutdown++;
    periods(12);
    check(!refreshing && mode9, "3-phase configuration reached");
    for (int i = 1; i < 3; i++) begin
      start_delay(i, dl);
      check(dl > 3.0 * i - 0.01 && dl < 3.0 * i + 0.01,
            $sformatf("3-phase: phase %0d starts %f clocks after phase 1", i + 1, dl));
    end
    n_interleave3++;
    periods(300);
    check_reg(0, 50, 0.05, "3-phase regulation");

    // 4. over-current on phase 3
    @(negedge clk) ocp = 4'b0100;
    @(negedge clk) ocp = 4'b0000;
    periods(12);
    check(phase_enable == 4'b0011 && !mode9, "2-phase configuration");
    if (phase_enable == 4'b0011) n_ocp_shutdown++;
    start_delay(1, dl);
    check(dl > 3.99 && dl < 4.01, $sformatf("2-phase: phase 2 starts %f clocks after phase 1", dl));
    n_interleave2++;
    periods(300);
    check_reg(0, 50, 0.05, "2-phase regulation");

    // 4b. over-current on phase 2: one phase left, the third failure
    @(negedge clk) ocp = 4'b0010;
    @(negedge clk) ocp = 4'b0000;
    periods(12);
    check(phase_enable == 4'b0001 && !mode9 && !refreshing, "single-phase configuration");
    if (phase_enable == 4'b0001) n_ocp_shutdown++;
    n_interleave1++;
    periods(300);
    check_reg(0, 50, 0.05, "single-phase regulation");

    // 5. faults corrected
    @(negedge clk) ocp_clear = 1'b1;
    @(negedge clk) ocp_clear = 1'b0;
    periods(400);
    check(phase_enable == 4'b1111, "four phases again");
    check_reg(0, 50, 0.05, "4-phase regulation after clear");

    // 6. multi-output: four converters
    vref = '{1.2, 1.8, 2.5, 3.3};
    mode = MODE_MULTI;
    n_multi_out++;
    periods(900);
    for (int j = 0; j < N_PH; j++) check_reg(j, 50, 0.05, "multi-output regulation");

    // mechanisms
    check(n_lock > 0, "delay lock never seen");
    check(n_interleave4 > 0 && n_interleave3 > 0 && n_interleave2 > 0, "interleaving cases");
    check(n_ocp_shutdown == 3, "over-current shutdowns");
    check(n_interleave1 > 0, "single phase reached");
    check(n_refresh >= 3, $sformatf("angle refreshes: %0d", n_refresh));
    check(n_mode9 > 0, "9-state periods");
    check(n_load_step > 0 && n_multi_out > 0, "load step and mode switch");
    check(n_deadtime > 0, "dead time observed");
    check(n_overlap == 0, $sformatf("c and c_n overlapped %0d times", n_overlap));
    check(n_regulated >= 10, $sformatf("regulated windows: %0d", n_regulated));
    $display("mechanisms: lock=%0d 4ph=%0d 3ph=%0d 2ph=%0d 1ph=%0d ocp=%0d refresh=%0d mode9_periods=%0d load=%0d multi=%0d deadtime=%0d overlap=%0d regulated=%0d",
             n_lock, n_interleave4, n_interleave3, n_interleave2, n_interleave1, n_ocp_shutdown, n_refresh,
             n_mode9, n_load_step, n_multi_out, n_deadtime, n_overlap, n_regulated);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
