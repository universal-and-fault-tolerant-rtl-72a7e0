`timescale 1ns / 1ps
// Testbench for sync_block: writes phase slots, changes the enabled set
// and checks offsets (0/2/4/6, 0/3/6, 0/4, 0), the 9-state mode, the set
// conditions and that changes wait for the counter wrap.
module tb_sync_block;
  import mdpwm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [1:0] phase_sel = '0, phase_angle = '0;
  logic [N_PH-1:0] phase_enable = '0;
  logic [R_W-1:0] r;
  logic wrap, mode9;
  logic [N_PH-1:0][R_W-1:0] s;
  logic [N_PH-1:0] sp;
  int checks = 0, failures = 0;

  // reference ramp driven by the block's own mode output
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) r <= '0;
    else r <= wrap ? '0 : r + 1'b1;
  assign wrap = (r == (mode9 ? 4'd8 : 4'd7));

  sync_block dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic write_slot(input int p, input int k);
    @(negedge clk); phase_sel = 2'(p); phase_angle = 2'(k);
    @(negedge clk);
  endtask

  task automatic wait_wrap();
    do begin @(posedge clk); #1; end while (!wrap);
    @(posedge clk); #1;   // first state of the new period
  endtask

  // one period: check each state's sp and the offsets
  task automatic check_period(input logic [N_PH-1:0] en, input int off [4],
                              input bit m9);
    int last = m9 ? 8 : 7;
    check(mode9 == m9, $sformatf("mode9=%0b expected %0b", mode9, m9));
    for (int i = 0; i < N_PH; i++)
      if (en[i]) check(s[i] == R_W'(off[i]), $sformatf("s[%0d]=%0d expected %0d", i, s[i], off[i]));
    for (int k = 0; k <= last; k++) begin
      check(r == R_W'(k), "ramp");
      for (int i = 0; i < N_PH; i++)
        check(sp[i] == (en[i] && off[i] == k),
              $sformatf("sp[%0d] at r=%0d is %0b", i, k, sp[i]));
      @(posedge clk); #1;
    end
  endtask

  int o4 [4] = '{0, 2, 4, 6};
  int o3 [4] = '{0, 3, 6, 0};
  int o2 [4] = '{0, 4, 0, 0};
  int o1 [4] = '{0, 0, 0, 0};
  int o3b[4] = '{0, 0, 3, 6};

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // four phases, slots 0..3
    for (int p = 0; p < 4; p++) write_slot(p, p);
    phase_enable = 4'b1111;
    wait_wrap();
    check_period(4'b1111, o4, 1'b0);
    check_period(4'b1111, o4, 1'b0);
    // phase 4 lost: enabled count 3 -> 9 states, slots 0,1,2
    phase_enable = 4'b0111;
    // until the wrap the old offsets stay (no sp for the disabled phase)
    check(mode9 == 1'b0, "mode change waits for wrap");
    wait_wrap();
    check_period(4'b0111, o3, 1'b1);
    check_period(4'b0111, o3, 1'b1);
    // two phases, slots 0 and 1
    phase_enable = 4'b0011;
    wait_wrap();
    check_period(4'b0011, o2, 1'b0);
    // single phase
    phase_enable = 4'b0001;
    wait_wrap();
    check_period(4'b0001, o1, 1'b0);
    // phase 1 lost out of four: phases 2..4 get slots 0,1,2
    write_slot(0, 0); write_slot(1, 0); write_slot(2, 1); write_slot(3, 2);
    phase_enable = 4'b1110;
    wait_wrap();
    check_period(4'b1110, o3b, 1'b1);
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
