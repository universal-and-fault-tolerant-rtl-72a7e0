`timescale 1ns / 1ps
// Segmented delay matching circuit of one MDPWM phase.
//
// Keeps the delay line's total delay equal to one clock period. One clock
// after delta(t) was launched (launched high at the launch edge, lvl the
// level it was switched to) the taps are sampled:
//   8-state mode: the edge must have passed n31 (31 cells) but not n32;
//   9-state mode: passed n28 but not n28a (28.44 cells = one clock, since
//                 a cell is 1/256 of a 9-clock period).
// Already past the late tap: the line is too fast, current is decreased.
// Not yet at the early tap: too slow, current is increased. Otherwise the
// loop holds and reports locked. A launch that the phase had to hold
// back because the previous edge was still inside the line (blocked)
// means the line is longer than a whole period and also counts as too
// slow; since the phase never has more than one edge in the line, a tap
// can never show a stale edge. The fine code moves one step per check
// and carries into the coarse code at its ends (31 -> coarse+1, fine 16;
// 0 -> coarse-1, fine 15) so the current stays monotonic. The decision
// rule follows the document (compare 32 cells with the clock period,
// lower the current if the clock period is longer); the window taps, the
// carry scheme and the codes' widths are this design's choices. Taps are
// asynchronous to clk and sampled directly.
module delay_match
  import mdpwm_pkg::*;
#(
  parameter logic [CRS_W-1:0] COARSE_INIT = CRS_W'(32),
  parameter logic [FIN_W-1:0] FINE_INIT   = FIN_W'(16)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             launched,
  input  logic             blocked,
  input  logic             lvl,
  input  logic             mode9,
  input  logic             n28,
  input  logic             n28a,
  input  logic             n31,
  input  logic             n32,
  output logic [CRS_W-1:0] coarse,
  output logic [FIN_W-1:0] fine,
  output logic             locked
);

  logic check;
  logic early_ok, late_hit;

  assign early_ok = ((mode9 ? n28  : n31) == lvl);
  assign late_hit = ((mode9 ? n28a : n32) == lvl);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      check  <= 1'b0;
      coarse <= COARSE_INIT;
      fine   <= FINE_INIT;
      locked <= 1'b0;
    end else begin
      check <= launched;
      if (check || blocked) begin
        if (check && !blocked && late_hit) begin      // too fast: less current
          locked <= 1'b0;
          if (fine != '0)            fine <= fine - 1'b1;
          else if (coarse != '0) begin
            coarse <= coarse - 1'b1;
            fine   <= FIN_W'(15);
          end
        end else if (blocked || !early_ok) begin       // too slow: more current
          locked <= 1'b0;
          if (fine != '1)            fine <= fine + 1'b1;
          else if (coarse != '1) begin
            coarse <= coarse + 1'b1;
            fine   <= FIN_W'(16);
          end
        end else begin
          locked <= 1'b1;
        end
      end
    end
  end

endmodule
