`timescale 1ns / 1ps
// Universal fault-tolerant four-phase digital PWM controller (top level).
//
// Master management unit, four PID compensators, the four-phase MDPWM and
// four dead-time generators. The four windowed ADCs are outside this RTL:
// their signed 4-bit error words come in on e, and the unit's sample
// strobes go out on adc_clk.
//  * Interleaved mode (mode = 0): compensator 1 regulates the common output
//    and its duty command drives every enabled phase; the phases are
//    spread evenly over the period. An over-current flag on a phase turns
//    it off and the remaining phases are re-spread (4 -> 3 -> 2 -> 1).
//  * Multi-output mode (mode = 1): phase i runs from compensator i and
//    regulates its own converter.
// f_sw = f_clk/8, or f_clk/9 while exactly three phases run.
// The block set and its connections follow the controller's block
// diagram; the duty routing between compensators and phases is this
// design's choice.
module univ_mdpwm_ctrl
  import mdpwm_pkg::*;
(
  input  logic                            clk,
  input  logic                            rst_n,
  input  op_mode_e                        mode,
  input  logic [N_PH-1:0]                 phase_req,
  input  logic [N_PH-1:0]                 ocp,
  input  logic                            ocp_clear,
  input  logic [N_PH-1:0][E_W-1:0]        e,
  input  logic [N_PH-1:0][K_W-1:0]        ka,
  input  logic [N_PH-1:0][K_W-1:0]        kb,
  input  logic [N_PH-1:0][K_W-1:0]        kc,
  input  logic [DT_W-1:0]                 dt_code,
  output logic [N_PH-1:0]                 c,
  output logic [N_PH-1:0]                 c_n,
  output logic [N_PH-1:0]                 dpwm,
  output logic [N_PH-1:0]                 adc_clk,
  output logic [N_PH-1:0]                 phase_enable,
  output logic [N_PH-1:0]                 locked,
  output logic                            refreshing,
  output logic                            mode9
);

  logic [1:0]                phase_sel, phase_angle;
  logic [N_PH-1:0]           comp_en, pid_clk;
  logic [N_PH-1:0][D_W-1:0]  d_pid, d_ph;
  logic [R_W-1:0]            r;
  logic                      wrap;

  mmu u_mmu (
    .clk (clk), .rst_n (rst_n), .mode (mode), .phase_req (phase_req),
    .ocp (ocp), .ocp_clear (ocp_clear), .wrap (wrap),
    .phase_enable (phase_enable), .phase_sel (phase_sel),
    .phase_angle (phase_angle), .comp_en (comp_en), .adc_clk (adc_clk),
    .pid_clk (pid_clk), .refreshing (refreshing)
  );

  for (genvar i = 0; i < N_PH; i++) begin : g_pid
    pid u_pid (
      .clk (clk), .rst_n (rst_n), .en (comp_en[i]), .step (pid_clk[i]),
      .e (e[i]), .ka (ka[i]), .kb (kb[i]), .kc (kc[i]), .d (d_pid[i])
    );
    assign d_ph[i] = (mode == MODE_INTERLEAVED) ? d_pid[0] : d_pid[i];
  end

  mdpwm u_mdpwm (
    .clk (clk), .rst_n (rst_n), .phase_sel (phase_sel),
    .phase_angle (phase_angle), .phase_enable (phase_enable), .d (d_ph),
    .dpwm (dpwm), .r (r), .wrap (wrap), .mode9 (mode9), .locked (locked)
  );

  for (genvar i = 0; i < N_PH; i++) begin : g_dt
    deadtime u_dt (
      .dpwm (dpwm[i]), .dt_code (dt_code), .c (c[i]), .c_n (c_n[i])
    );
  end

endmodule
