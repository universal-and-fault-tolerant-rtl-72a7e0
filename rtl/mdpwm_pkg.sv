`timescale 1ns / 1ps
// Shared constants, types and conversion functions of the multiphase
// digital PWM controller.
//
// The MDPWM makes an 8-bit duty ratio out of a coarse part taken from a
// shared 8- or 9-state counter and a fine part taken from a 32-cell delay
// line. With 1, 2 or 4 active phases the counter has 8 states and the
// split is simply 3 MSBs / 5 LSBs. With 3 phases the counter needs 9
// states, and the split is computed by ncn_of()/ndl_of() below so that the
// duty-to-time characteristic stays monotonic (minimum-error criterion of
// the counter step 1/9 and the cell step 1/256 of a period).
// offset_of() turns a phase slot into a counter offset for a given number
// of active phases (0/2/4/6, 0/3/6, 0/4 or 0).
package mdpwm_pkg;

  localparam int unsigned N_PH   = 4;   // phases
  localparam int unsigned D_W    = 11;  // duty command from the compensator
  localparam int unsigned DC_W   = 8;   // hardware duty word
  localparam int unsigned R_W    = 4;   // counter output
  localparam int unsigned NDL_W  = 5;   // delay-cell count
  localparam int unsigned E_W    = 4;   // ADC error word
  localparam int unsigned CRS_W  = 6;   // coarse bias code
  localparam int unsigned FIN_W  = 5;   // fine bias code
  localparam int unsigned DT_W   = 4;   // dead-time code
  localparam int unsigned K_W    = 12;  // PID coefficient width

  typedef enum logic {
    MODE_INTERLEAVED = 1'b0,
    MODE_MULTI       = 1'b1
  } op_mode_e;

  // Counter steps before the delay line is launched, 9-state mode:
  // largest N with N/9 <= dc/256.
  function automatic logic [R_W-1:0] ncn_of(input logic [DC_W-1:0] dc);
    logic [11:0] p;
    p = 12'(dc) * 12'd9;
    return R_W'(p >> 8);
  endfunction

  // Delay cells in 9-state mode: the remainder dc - N_cn*256/9, in cells of
  // 1/256 period, rounded to the nearest cell.
  function automatic logic [NDL_W-1:0] ndl_of(input logic [DC_W-1:0] dc);
    logic [11:0] p;
    logic [8:0]  rem;
    p   = 12'(dc) * 12'd9;
    rem = {1'b0, p[7:0]};
    return NDL_W'((rem + 9'd4) / 9'd9);
  endfunction

  // Counter offset of phase slot k when n phases are enabled.
  function automatic logic [R_W-1:0] offset_of(input logic [1:0] k,
                                               input logic [2:0] n);
    case (n)
      3'd2:    return R_W'({k[0], 2'b00});            // 0, 4
      3'd3:    return (k == 2'd0) ? R_W'(0) :
                      (k == 2'd1) ? R_W'(3) : R_W'(6); // 0, 3, 6
      3'd4:    return R_W'({k, 1'b0});                // 0, 2, 4, 6
      default: return '0;                             // one phase
    endcase
  endfunction

endpackage
