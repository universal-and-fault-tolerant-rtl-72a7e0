`timescale 1ns / 1ps
// First-order sigma-delta modulator: 11-bit duty command to 8-bit word.
//
// The 8 MSBs of d pass to dc; the 3 LSBs are added to a 3-bit accumulator
// once per switching period (step) and the carry out adds one LSB to dc
// for that period. Over 8 periods the mean of dc equals d/8 exactly, which
// gives the 11-bit effective resolution on top of 8 hardware bits. dc is
// computed from the present accumulator and d so it is valid in the same
// cycle in which the phase takes it (the set edge); the accumulator moves
// on at that edge. dc saturates at 255. The document gives the function
// (11 to 8 bits with a sigma-delta); the first-order error-feedback form
// is this design's choice.
module sigma_delta
  import mdpwm_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            step,
  input  logic [D_W-1:0]  d,
  output logic [DC_W-1:0] dc
);

  localparam int unsigned LSB_W = D_W - DC_W;

  logic [LSB_W-1:0] acc;
  logic [LSB_W:0]   sum;
  logic [DC_W:0]    msb_inc;

  assign sum     = {1'b0, acc} + {1'b0, d[LSB_W-1:0]};
  assign msb_inc = {1'b0, d[D_W-1:LSB_W]} + (DC_W+1)'(sum[LSB_W]);
  assign dc      = msb_inc[DC_W] ? '1 : msb_inc[DC_W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    acc <= '0;
    else if (step) acc <= sum[LSB_W-1:0];
  end

endmodule
