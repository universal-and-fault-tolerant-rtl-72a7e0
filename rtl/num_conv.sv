`timescale 1ns / 1ps
// Number conversion and comparison of one MDPWM phase (combinational).
//
// Splits the 8-bit duty word dc into a counter part and a delay-line part
// and adds the phase offset s to the counter part:
//   8-state mode: counter part dc[7:5], delay cells dc[4:0]; target is
//                 (dc[7:5] + s) mod 8.
//   9-state mode: counter part N_cn = floor(9 dc / 256), delay cells
//                 N_dl = round((9 dc mod 256) / 9); target is
//                 (N_cn + s) mod 9. These are the minimum-error tables of
//                 the 3-phase mode, computed here instead of stored.
// match is high while the counter output r equals the target; the delay
// line is launched on the clock edge that ends that state.
module num_conv
  import mdpwm_pkg::*;
(
  input  logic [DC_W-1:0]  dc,
  input  logic [R_W-1:0]   s,
  input  logic             mode9,
  input  logic [R_W-1:0]   r,
  output logic [R_W-1:0]   tgt,
  output logic [NDL_W-1:0] ndl,
  output logic             match
);

  logic [R_W-1:0] ncn;
  logic [R_W:0]   sum;

  always_comb begin
    if (mode9) begin
      ncn = ncn_of(dc);
      ndl = ndl_of(dc);
      sum = {1'b0, ncn} + {1'b0, s};
      tgt = (sum >= (R_W+1)'(9)) ? R_W'(sum - (R_W+1)'(9)) : sum[R_W-1:0];
    end else begin
      ncn = R_W'(dc[DC_W-1:NDL_W]);
      ndl = dc[NDL_W-1:0];
      sum = {1'b0, ncn} + {1'b0, s};
      tgt = {1'b0, sum[2:0]};
    end
  end

  assign match = (r == tgt);

endmodule
