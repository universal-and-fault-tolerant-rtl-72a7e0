`timescale 1ns / 1ps
// One phase of the multiphase DPWM.
//
// A switching period of this phase starts on the clock edge that ends the
// counter state equal to its offset (sp high, phase enabled): the output
// goes high and the sigma-delta word dc, the offset and the mode are
// captured for the period. The number conversion block gives the counter
// state at which delta(t) is launched into the delay line and the number
// of cells N_dl; the output falls N_dl cell delays after that launch edge.
// With dc = 0 set and reset coincide and the output stays low.
//
// The set/reset latch is realised with two toggles in the clock domain:
// S is set to ~L at the period start, and the launch copies S into L. L
// runs through the delay line, and dpwm = S xor (L after N_dl cells).
// Both edges of L travel the line alike, so a late reset can never mask
// the following set, even at duty ratios close to 1. A disabled phase is
// forced low at once. A launch waits until the previous edge has left
// the line (n32 equal to L): while the line is slower than a whole period
// (only before the delay matching has caught up, e.g. after a large clock
// step) the launch is dropped, the pulse ends on the clock edge instead,
// and the matching circuit is told to speed the line up. delta(t) also
// feeds the delay matching circuit, which
// trims the line to one clock period. The split into counter, delay line
// and sigma-delta and the latch set/reset points follow the document; the
// toggle form of the latch is this design's choice.
module mdpwm_phase
  import mdpwm_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [D_W-1:0]   d,
  input  logic [R_W-1:0]   s,
  input  logic             sp,
  input  logic [R_W-1:0]   r,
  input  logic             mode9,
  output logic             dpwm,
  output logic [CRS_W-1:0] coarse,
  output logic [FIN_W-1:0] fine,
  output logic             locked
);

  logic             set_now, fire_due, fire, blocked, line_idle;
  logic [DC_W-1:0]  dc_live, dc_q, dc_eff;
  logic [R_W-1:0]   s_q, s_eff;
  logic             m9_q, m9_eff;
  logic             armed;
  logic             S, L;
  logic [R_W-1:0]   tgt;
  logic [NDL_W-1:0] ndl, sel_q;
  logic             match;
  logic             dout, n28, n28a, n31, n32;

  assign set_now = en && sp;

  sigma_delta u_sd (
    .clk (clk), .rst_n (rst_n), .step (set_now), .d (d), .dc (dc_live)
  );

  assign dc_eff = set_now ? dc_live : dc_q;
  assign s_eff  = set_now ? s       : s_q;
  assign m9_eff = set_now ? mode9   : m9_q;

  num_conv u_nc (
    .dc (dc_eff), .s (s_eff), .mode9 (m9_eff), .r (r),
    .tgt (tgt), .ndl (ndl), .match (match)
  );

  assign line_idle = (n32 == L);
  assign fire_due  = en && match && (set_now || armed);
  assign fire      = fire_due && line_idle;
  assign blocked   = fire_due && !line_idle;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      S     <= 1'b0;
      L     <= 1'b0;
      armed <= 1'b0;
      dc_q  <= '0;
      s_q   <= '0;
      m9_q  <= 1'b0;
      sel_q <= '0;
    end else if (!en) begin
      S     <= L;
      armed <= 1'b0;
    end else begin
      if (set_now) begin
        S     <= ~L;
        dc_q  <= dc_live;
        s_q   <= s;
        m9_q  <= mode9;
        armed <= !match;
      end else if (fire_due) begin
        armed <= 1'b0;
      end
      if (blocked) begin
        S     <= L;                    // end the pulse on this clock edge
      end
      if (fire) begin
        L     <= set_now ? ~L : S;
        sel_q <= ndl;
      end
    end
  end

  delay_line u_dl (
    .din (L), .sel (sel_q), .coarse (coarse), .fine (fine),
    .dout (dout), .n28 (n28), .n28a (n28a), .n31 (n31), .n32 (n32)
  );

  delay_match u_dm (
    .clk (clk), .rst_n (rst_n), .launched (fire), .blocked (blocked), .lvl (L), .mode9 (m9_q),
    .n28 (n28), .n28a (n28a), .n31 (n31), .n32 (n32),
    .coarse (coarse), .fine (fine), .locked (locked)
  );

  assign dpwm = en && (S ^ dout);

endmodule
