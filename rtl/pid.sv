`timescale 1ns / 1ps
// Programmable discrete PID compensator.
//
// Incremental (velocity) form, evaluated once per step strobe (the PID
// clock issued by the management unit):
//   u[n] = u[n-1] + ka*e[n] + kb*e[n-1] + kc*e[n-2]
// which is a PID with ka = Kp+Ki+Kd, kb = -(Kp+2Kd), kc = Kd. e is the
// signed 4-bit ADC error (positive when the output is below the
// reference). u carries FRAC fractional bits, the coefficients are signed
// in units of 2^-FRAC duty LSBs, and u saturates to the 11-bit duty range,
// so the integrator cannot wind up. d = integer part of u, registered.
// When en is low the state is cleared. The document names programmable
// PID compensators producing the 11-bit duty command; the incremental form,
// the coefficient format and the saturation are this design's choices.
module pid
  import mdpwm_pkg::*;
#(
  parameter int unsigned FRAC = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  logic                   step,
  input  logic signed [E_W-1:0]  e,
  input  logic signed [K_W-1:0]  ka,
  input  logic signed [K_W-1:0]  kb,
  input  logic signed [K_W-1:0]  kc,
  output logic [D_W-1:0]         d
);

  localparam int unsigned U_W   = D_W + FRAC;        // unsigned state width
  localparam int unsigned ACC_W = U_W + 4;           // sum width, signed
  localparam logic signed [ACC_W-1:0] U_MAX = ACC_W'((1 << U_W) - 1);

  logic [U_W-1:0]          u;
  logic signed [E_W-1:0]   e1, e2;
  logic signed [ACC_W-1:0] acc;

  always_comb begin
    acc = $signed({4'b0, u})
        + ACC_W'(ka * e) + ACC_W'(kb * e1) + ACC_W'(kc * e2);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      u  <= '0;
      e1 <= '0;
      e2 <= '0;
    end else if (!en) begin
      u  <= '0;
      e1 <= '0;
      e2 <= '0;
    end else if (step) begin
      e1 <= e;
      e2 <= e1;
      if (acc < 0)          u <= '0;
      else if (acc > U_MAX) u <= '1;
      else                  u <= acc[U_W-1:0];
    end
  end

  assign d = u[U_W-1:FRAC];

endmodule
