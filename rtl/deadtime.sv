`timescale 1ns / 1ps
// Behavioural model (not synthesizable) of one dead-time generator.
//
// Turns a PWM signal into the two gate signals of a synchronous buck leg:
// c drives the main switch, c_n the synchronous rectifier. Both turn-on
// edges are held back by the dead time t_dt = dt_code * DT_UNIT_NS, so
// the two switches are never on together:
//   c   = dpwm and (dpwm delayed by t_dt)
//   c_n = not dpwm and not (dpwm delayed by t_dt)
// The delay is an analog element, hence a model. The document states that
// dead times are digitally programmable; the code width, the unit and the
// symmetric treatment of both edges are this model's own.
module deadtime
  import mdpwm_pkg::*;
#(
  parameter real DT_UNIT_NS = 1.0
) (
  input  logic            dpwm,
  input  logic [DT_W-1:0] dt_code,
  output logic            c,
  output logic            c_n
);

  real  t_dt;
  logic dly;

  assign t_dt = real'(dt_code) * DT_UNIT_NS;

  initial dly = 1'b0;
  always @(dpwm) dly <= #(t_dt) dpwm;

  assign c   = dpwm & dly;
  assign c_n = ~dpwm & ~dly;

endmodule
