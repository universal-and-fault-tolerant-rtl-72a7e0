`timescale 1ns / 1ps
// Programmable 8/9-state counter shared by all MDPWM phases.
//
// r counts 0..7 when mode9 is low and 0..8 when it is high; one full count
// is one switching period, so the switching frequency is f_clk/8 or
// f_clk/9. mode9 comes from the synchronization block (high with exactly
// three active phases); the synchronization block changes it only on the
// wrap edge, so a period is never shortened or stretched half-way. wrap
// is high during the last state. Reset to state 0 is this design's
// choice; the 8 and 9 state counts follow the MDPWM description.
module prog_counter
  import mdpwm_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           mode9,
  output logic [R_W-1:0] r,
  output logic           wrap
);

  assign wrap = (r == (mode9 ? R_W'(8) : R_W'(7)));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r <= '0;
    end else if (wrap) begin
      r <= '0;
    end else begin
      r <= r + 1'b1;
    end
  end

endmodule
