`timescale 1ns / 1ps
// Testbench for mdpwm_phase at a 40 MHz clock (5 MHz switching, 8 states;
// 4.44 MHz, 9 states). The testbench runs its own ramp and set condition.
// After the delay matching has locked it measures the pulse width for a
// range of duty words and compares it with dc/256 of the period (8-state)
// or N_cn/9 + N_dl/256 (9-state, reference split recomputed here), within
// 1.5 cells. Also checks the period (8 or 9 clocks), zero duty, a phase
// offset, the 11-bit average through the sigma-delta and shutdown.
module tb_mdpwm_phase;
  import mdpwm_pkg::*;

  localparam real TCLK = 25.0;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, mode9 = 1'b0;
  logic [D_W-1:0] d = '0;
  logic [R_W-1:0] s = '0, r;
  logic sp, dpwm, locked;
  logic [CRS_W-1:0] coarse;
  logic [FIN_W-1:0] fine;
  int checks = 0, failures = 0;
  realtime t_rise = 0, t_fall = 0, t_rise_prev = 0;
  int n_rise = 0;

  mdpwm_phase dut (.*);

  always #(TCLK / 2.0) clk = ~clk;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) r <= '0;
    else r <= (r == (mode9 ? 4'd8 : 4'd7)) ? '0 : r + 1'b1;
  assign sp = (r == s);

  always @(posedge dpwm) begin t_rise_prev = t_rise; t_rise = $realtime; n_rise++; end
  always @(negedge dpwm) t_fall = $realtime;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic real ideal(input int dc, input bit m9);
    int ncn;
    if (!m9) return real'(dc) / 256.0;
    ncn = $rtoi($floor(real'(dc) * 9.0 / 256.0));
    return real'(ncn) / 9.0 +
           real'($rtoi($floor(real'(dc) - real'(ncn) * 256.0 / 9.0 + 0.5))) / 256.0;
  endfunction

  // width of the next complete pulse
  task automatic measure(output real w);
    realtime ta;
    @(posedge dpwm);
    ta = $realtime;
    @(negedge dpwm);
    w = $realtime - ta;
  endtask

  task automatic sweep(input bit m9);
    real ts, w, tcell;
    ts = TCLK * (m9 ? 9.0 : 8.0);
    tcell = ts / 256.0;
    for (int dc = 1; dc < 256; dc += 7) begin
      d = D_W'(dc * 8);
      repeat (3) @(posedge dpwm);
      measure(w);
      check((w - ideal(dc, m9) * ts) < 1.5 * tcell && (ideal(dc, m9) * ts - w) < 1.5 * tcell,
            $sformatf("mode9=%0b dc=%0d width %f ns, expected %f ns", m9, dc, w, ideal(dc, m9) * ts));
      check(t_rise - t_rise_prev == ts || n_rise < 2,
            $sformatf("period %f ns", t_rise - t_rise_prev));
    end
  endtask

  initial begin
    real w, sum;
    int n0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    en = 1'b1;
    d = 11'd1024;
    repeat (150) @(posedge dpwm);
    check(locked, "delay matching locked (8 states)");
    sweep(1'b0);
    // sigma-delta: 11-bit command 8*100+4 -> mean width 100.5/256
    d = 11'd804;
    sum = 0.0;
    @(posedge dpwm);
    for (int k = 0; k < 16; k++) begin measure(w); sum += w; end
    check(sum / 16.0 > 99.75 / 256.0 * 200.0 && sum / 16.0 < 101.25 / 256.0 * 200.0,
          $sformatf("sigma-delta mean width %f ns", sum / 16.0));
    // zero duty: no pulse at all
    d = '0;
    repeat (2) @(posedge clk iff r == 0);
    n0 = n_rise;
    repeat (5) @(posedge clk iff r == 0);
    check(n_rise == n0 && !dpwm, "zero duty gives no pulse");
    // offset 5: pulse starts 5 clocks after the ramp start
    d = 11'd512; s = 4'd5;
    repeat (3) @(posedge dpwm);
    @(posedge clk iff r == 0);
    begin
      realtime t0;
      t0 = $realtime;
      @(posedge dpwm);
      check($realtime - t0 == 5.0 * TCLK, $sformatf("offset start %f ns", $realtime - t0));
    end
    s = '0;
    // nine states
    @(posedge clk iff r == 7);
    mode9 = 1'b1;
    d = 11'd1024;
    repeat (150) @(posedge dpwm);
    check(locked, "delay matching locked (9 states)");
    sweep(1'b1);
    // shutdown
    @(posedge dpwm);
    #3 en = 1'b0;
    #0.1 check(!dpwm, "disabled phase drops at once");
    n0 = n_rise;
    repeat (30) @(posedge clk);
    check(n_rise == n0, "no pulses while disabled");
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
