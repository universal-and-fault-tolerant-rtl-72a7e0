`timescale 1ns / 1ps
// Four-phase digital pulse-width modulator.
//
// One programmable 8/9-state counter and one synchronization block are
// shared by four phases (sigma-delta, number conversion, delay line, delay
// matching, output latch each). The active phases and their slots come
// from phase_enable and the phase_sel/phase_angle write port; the counter
// runs 9 states when exactly three phases are enabled and 8 otherwise, so
// f_sw = f_clk/8 or f_clk/9. Each phase's duty ratio follows its own d_i.
// r, wrap and mode9 are brought out for the management unit's timing.
module mdpwm
  import mdpwm_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [1:0]                phase_sel,
  input  logic [1:0]                phase_angle,
  input  logic [N_PH-1:0]           phase_enable,
  input  logic [N_PH-1:0][D_W-1:0]  d,
  output logic [N_PH-1:0]           dpwm,
  output logic [R_W-1:0]            r,
  output logic                      wrap,
  output logic                      mode9,
  output logic [N_PH-1:0]           locked
);

  logic [N_PH-1:0][R_W-1:0] s;
  logic [N_PH-1:0]          sp;

  prog_counter u_cnt (
    .clk (clk), .rst_n (rst_n), .mode9 (mode9), .r (r), .wrap (wrap)
  );

  sync_block u_sync (
    .clk (clk), .rst_n (rst_n), .phase_sel (phase_sel),
    .phase_angle (phase_angle), .phase_enable (phase_enable),
    .r (r), .wrap (wrap), .mode9 (mode9), .s (s), .sp (sp)
  );

  for (genvar i = 0; i < N_PH; i++) begin : g_ph
    logic [CRS_W-1:0] coarse;
    logic [FIN_W-1:0] fine;
    mdpwm_phase u_ph (
      .clk (clk), .rst_n (rst_n), .en (phase_enable[i]), .d (d[i]),
      .s (s[i]), .sp (sp[i]), .r (r), .mode9 (mode9),
      .dpwm (dpwm[i]), .coarse (coarse), .fine (fine), .locked (locked[i])
    );
  end

endmodule
