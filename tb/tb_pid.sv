`timescale 1ns / 1ps
// Testbench for pid: random errors and coefficients, compared step by
// step with an integer reference of u[n] = u[n-1] + ka e[n] + kb e[n-1]
// + kc e[n-2] clamped to 0 .. 2^15-1, d = u / 16. Also checks that the
// state moves only on step and is cleared when disabled.
module tb_pid;
  import mdpwm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, step = 1'b0;
  logic signed [E_W-1:0] e = '0;
  logic signed [K_W-1:0] ka = '0, kb = '0, kc = '0;
  logic [D_W-1:0] d;
  int checks = 0, failures = 0;

  pid dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int u, e1, e2, ev, na, nb, nc;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(negedge clk) en = 1'b1;
    for (int run = 0; run < 6; run++) begin
      u = 0; e1 = 0; e2 = 0;
      na = $urandom_range(0, 400); nb = -$urandom_range(0, 300); nc = $urandom_range(0, 60);
      if (run == 0) begin na = 48; nb = -32; nc = 0; end
      ka = K_W'(na); kb = K_W'(nb); kc = K_W'(nc);
      for (int n = 0; n < 400; n++) begin
        ev = (n < 150) ? $urandom_range(0, 7) : int'($urandom_range(0, 15)) - 8;
        @(negedge clk); e = E_W'(ev); step = 1'b1;
        @(negedge clk); step = 1'b0;
        u = u + na * ev + nb * e1 + nc * e2;
        if (u < 0) u = 0;
        if (u > 32767) u = 32767;
        e2 = e1; e1 = ev;
        check(int'(d) == u / 16, $sformatf("run %0d n %0d: d=%0d expected %0d", run, n, d, u / 16));
        // idle clocks must not change anything
        @(negedge clk);
        check(int'(d) == u / 16, "hold between steps");
      end
      @(negedge clk) en = 1'b0;
      @(negedge clk) check(d == '0, "cleared when disabled");
      en = 1'b1;
    end
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
