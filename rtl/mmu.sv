`timescale 1ns / 1ps
// Master management unit.
//
// Decides which phases run and in which slots, which compensators work,
// and when the ADCs sample and the compensators update.
//  * Fault handling: an over-current flag on a phase (ocp[i]) marks it
//    failed; a failed phase stays off until ocp_clear or reset.
//    phase_enable = phase_req and not failed, registered.
//  * Angle refresh: when the enabled set changes, the unit writes the
//    slot of every phase from a stored table, one phase per switching
//    period (phase_sel/phase_angle), then parks on the last one. The slot
//    of a phase is the number of enabled phases below it, which spreads N
//    phases evenly (90, 120 or 180 degrees).
//  * Compensators: interleaved mode uses compensator 1 only; multi-output
//    mode uses one per enabled phase.
//  * ADC and PID clocks are one-cycle strobes: adc_clk at the first clock
//    of each switching period, pid_clk one clock later.
// Per-phase OCP, the slot table, the refresh rate and the strobe timing
// are this design's choices; the document gives the unit's duties.
module mmu
  import mdpwm_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  op_mode_e        mode,
  input  logic [N_PH-1:0] phase_req,
  input  logic [N_PH-1:0] ocp,
  input  logic            ocp_clear,
  input  logic            wrap,
  output logic [N_PH-1:0] phase_enable,
  output logic [1:0]      phase_sel,
  output logic [1:0]      phase_angle,
  output logic [N_PH-1:0] comp_en,
  output logic [N_PH-1:0] adc_clk,
  output logic [N_PH-1:0] pid_clk,
  output logic            refreshing
);

  typedef enum logic { ST_IDLE, ST_REFRESH } state_e;

  // Stored slot table: slot of phase p for each enable mask.
  typedef logic [N_PH-1:0][1:0] slots_t;
  function automatic slots_t slots_of(input logic [N_PH-1:0] mask);
    slots_t t;
    logic [1:0] k;
    k = '0;
    for (int p = 0; p < N_PH; p++) begin
      t[p] = k;
      if (mask[p]) k = k + 1'b1;
    end
    return t;
  endfunction

  slots_t SLOT_LUT [2**N_PH];
  always_comb begin
    for (int m = 0; m < 2**N_PH; m++) SLOT_LUT[m] = slots_of(N_PH'(m));
  end

  logic [N_PH-1:0] failed;
  logic [N_PH-1:0] en_prev;
  state_e          state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      failed       <= '0;
      phase_enable <= '0;
      en_prev      <= '0;
      state        <= ST_IDLE;
      phase_sel    <= '0;
      adc_clk      <= '0;
      pid_clk      <= '0;
    end else begin
      if (ocp_clear) failed <= '0;
      else           failed <= failed | (ocp & phase_req);
      phase_enable <= phase_req & ~failed & ~ocp;
      en_prev      <= phase_enable;

      case (state)
        ST_IDLE: if (en_prev != phase_enable) begin
          state     <= ST_REFRESH;
          phase_sel <= '0;
        end
        ST_REFRESH: if (en_prev != phase_enable) begin
          phase_sel <= '0;                      // restart on a new change
        end else if (wrap) begin
          if (phase_sel == 2'(N_PH - 1)) state <= ST_IDLE;
          else                           phase_sel <= phase_sel + 1'b1;
        end
        default: state <= ST_IDLE;
      endcase

      adc_clk <= wrap ? comp_en : '0;
      pid_clk <= adc_clk;
    end
  end

  assign phase_angle = SLOT_LUT[phase_enable][phase_sel];
  assign refreshing  = (state == ST_REFRESH);

  always_comb begin
    if (mode == MODE_INTERLEAVED) comp_en = (phase_enable != '0) ? N_PH'(1) : '0;
    else                          comp_en = phase_enable;
  end

endmodule
