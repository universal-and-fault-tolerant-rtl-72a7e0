`timescale 1ns / 1ps
// Testbench for num_conv: exhaustive over dc, offset and mode.
// 8-state: target (dc/32 + s) mod 8, dc mod 32 cells.
// 9-state: the split is recomputed in real arithmetic (largest counter
// part not above dc, remainder rounded to the nearest cell); the duty
// value must be monotonic in dc and its relative error must match the
// reference figures (0 below 29, about 1.5 % at 29, under 1.6 % overall).
module tb_num_conv;
  import mdpwm_pkg::*;

  logic [DC_W-1:0] dc;
  logic [R_W-1:0] s, r, tgt;
  logic mode9 = 1'b0;
  logic [NDL_W-1:0] ndl;
  logic match;
  int checks = 0, failures = 0;

  num_conv dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    real prev, val, err;
    int ncn_e, ndl_e;
    // 8-state
    mode9 = 1'b0;
    #1;
    for (int x = 0; x < 256; x++)
      for (int so = 0; so < 8; so += 2) begin
        dc = DC_W'(x); s = R_W'(so); r = R_W'((x / 32 + so) % 8); #1;
        check(tgt == R_W'((x / 32 + so) % 8) && ndl == NDL_W'(x % 32) && match,
              $sformatf("8-state dc=%0d s=%0d tgt=%0d ndl=%0d", x, so, tgt, ndl));
        r = R_W'((x / 32 + so + 1) % 8); #1;
        check(!match, "no match on other states");
      end
    // 9-state
    mode9 = 1'b1;
    prev = -1.0;
    for (int x = 0; x < 256; x++) begin
      ncn_e = $rtoi($floor(real'(x) * 9.0 / 256.0));
      ndl_e = $rtoi($floor(real'(x) - real'(ncn_e) * 256.0 / 9.0 + 0.5));
      for (int so = 0; so < 9; so += 3) begin
        dc = DC_W'(x); s = R_W'(so); r = R_W'((ncn_e + so) % 9); #1;
        check(tgt == R_W'((ncn_e + so) % 9) && ndl == NDL_W'(ndl_e) && match,
              $sformatf("9-state dc=%0d s=%0d tgt=%0d ndl=%0d exp %0d/%0d",
                        x, so, tgt, ndl, ncn_e, ndl_e));
      end
      val = (real'(tgt) * 256.0 / 9.0 + real'(ndl));   // s = 6 here: use offset-free value
      val = real'(ncn_e) * 256.0 / 9.0 + real'(ndl);
      check(val >= prev, $sformatf("monotonic at dc=%0d", x));
      prev = val;
      if (x > 0) begin
        err = 100.0 * (real'(x) - val) / real'(x);
        if (err < 0.0) err = -err;
        if (x < 29)  check(err < 1e-9, $sformatf("exact below 29, dc=%0d", x));
        if (x == 29) check(err > 1.45 && err < 1.60, $sformatf("error at 29 is %f", err));
        check(err < 1.6, $sformatf("error %f at dc=%0d", err, x));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
