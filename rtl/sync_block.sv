`timescale 1ns / 1ps
// Synchronization block of the MDPWM.
//
// Holds a 2-bit slot for each phase, written one phase at a time through
// phase_sel/phase_angle (the angle is written every clock the address is
// held, so a constant address simply rewrites the same value). At each
// counter wrap the written slots and the set of enabled phases become the
// active configuration: the number of enabled phases N fixes the spacing
// of the slots (8/N counter states, or 3 for N = 3) and mode9, which makes
// the counter count 9 states when N = 3. Each phase gets its counter
// offset s_i and a set condition sp_i = (r == s_i) for enabled phases.
// The slot reading of the 2-bit 'phase angle' field and the wrap-time
// update are this design's choices; the offsets follow the 90/120/180
// degree interleaving of the MDPWM description.
module sync_block
  import mdpwm_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [1:0]               phase_sel,
  input  logic [1:0]               phase_angle,
  input  logic [N_PH-1:0]          phase_enable,
  input  logic [R_W-1:0]           r,
  input  logic                     wrap,
  output logic                     mode9,
  output logic [N_PH-1:0][R_W-1:0] s,
  output logic [N_PH-1:0]          sp
);

  logic [N_PH-1:0][1:0] slot_wr;   // written slots
  logic [N_PH-1:0][1:0] slot_act;  // slots of the running period
  logic [2:0]           n_act;     // enabled phases of the running period
  logic [2:0]           n_req;

  always_comb begin
    n_req = '0;
    for (int i = 0; i < N_PH; i++) n_req += 3'(phase_enable[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot_wr  <= '0;
      slot_act <= '0;
      n_act    <= 3'd1;
    end else begin
      slot_wr[phase_sel] <= phase_angle;
      if (wrap) begin
        slot_act <= slot_wr;
        n_act    <= n_req;
      end
    end
  end

  assign mode9 = (n_act == 3'd3);

  always_comb begin
    for (int i = 0; i < N_PH; i++) begin
      s[i]  = offset_of(slot_act[i], n_act);
      sp[i] = phase_enable[i] && (r == s[i]);
    end
  end

endmodule
