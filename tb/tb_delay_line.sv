`timescale 1ns / 1ps
// Testbench for the delay_line model: for several bias codes, launches
// rising and falling edges and checks the arrival time at every tap
// against k * t_pd with t_pd = 25 ns / (coarse + fine/16), and n28a
// against 28.44 t_pd.
module tb_delay_line;
  import mdpwm_pkg::*;

  logic din = 1'b0;
  logic [NDL_W-1:0] sel = '0;
  logic [CRS_W-1:0] coarse = '0;
  logic [FIN_W-1:0] fine = '0;
  logic dout, n28, n28a, n31, n32;
  int checks = 0, failures = 0;

  delay_line dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic near(input realtime t, input real exp, input string what);
    real dt = t - exp;
    if (dt < 0.0) dt = -dt;
    check(dt < 0.002 + 0.001 * exp, $sformatf("%s: %f ns, expected %f ns", what, t, exp));
  endtask

  // time from an edge on din to the same edge on the watched output
  task automatic launch_and_time(input int tap, input real tpd, output realtime t);
    realtime t0;
    sel = NDL_W'(tap);
    #(34.0 * tpd + 10.0);
    t0 = $realtime;
    din = ~din;
    if (tap != 0) @(dout);
    t = $realtime - t0;
  endtask

  initial begin
    int cc [4] = '{63, 32, 4, 0};
    int ff [4] = '{16, 16, 8, 10};
    realtime t, t0, t28, t28a, t31, t32;
    real tpd;
    #10;
    for (int c = 0; c < 4; c++) begin
      coarse = CRS_W'(cc[c]); fine = FIN_W'(ff[c]);
      tpd = 25.0 / (real'(cc[c]) + real'(ff[c]) / 16.0);
      #1000;
      for (int tap = 0; tap < 32; tap += 5) begin
        launch_and_time(tap, tpd, t);
        near(t, real'(tap) * tpd, $sformatf("tap %0d code %0d/%0d", tap, cc[c], ff[c]));
      end
      #(34.0 * tpd + 10.0);
      t0 = $realtime;
      din = ~din;
      fork
        begin @(n28);  t28  = $realtime - t0; end
        begin @(n28a); t28a = $realtime - t0; end
        begin @(n31);  t31  = $realtime - t0; end
        begin @(n32);  t32  = $realtime - t0; end
      join
      near(t28, 28.0 * tpd, "n28");
      near(t28a, 28.44 * tpd, "n28a");
      near(t31, 31.0 * tpd, "n31");
      near(t32, 32.0 * tpd, "n32");
    end
    // the 10 MHz / 80 MHz corner: one cell is 390.6 ps at i = 64
    check(25.0 / (63.0 + 31.0 / 16.0) < 0.3906, "fast end of the range reachable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
