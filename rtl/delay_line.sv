`timescale 1ns / 1ps
// Behavioural model (not synthesizable) of the 32-cell MDPWM delay line.
//
// Each cell is a dual-bias current-starved inverter stage: its delay is
// inversely proportional to the mirrored discharge current, the scaled sum
// of a coarse and a fine programmable current source,
//   i = coarse + fine / K_RATIO   (coarse steps are K_RATIO fine steps)
//   t_pd = T0_NS / i
// With T0_NS = 25 ns the range reaches 390 ps at the top of the coarse
// code and tens of ns at the bottom, the 390.6 ps .. 39.06 ns span a cell
// needs for 100 kHz .. 10 MHz switching. Edges travel through the cells
// with transport delay. dout is the 32:1 multiplexer: input k is the node
// after k cells (k = 0 is din itself). n28, n31 and n32 are the nodes
// after 28, 31 and 32 cells; n28a is n28 through an extra 0.44 t_pd
// buffer, so n28a is 28.44 cells, one clock period in 9-state mode. The
// cell and tap structure follows the MDPWM description; the current law
// constants and code widths are this model's own.
module delay_line
  import mdpwm_pkg::*;
#(
  parameter int  N_CELLS = 32,
  parameter real T0_NS   = 25.0,
  parameter real K_RATIO = 16.0
) (
  input  logic             din,
  input  logic [NDL_W-1:0] sel,
  input  logic [CRS_W-1:0] coarse,
  input  logic [FIN_W-1:0] fine,
  output logic             dout,
  output logic             n28,
  output logic             n28a,
  output logic             n31,
  output logic             n32
);

  real  i_mirr;
  real  tpd;
  logic node [N_CELLS+1];
  logic n28a_q;

  always_comb begin
    i_mirr = real'(coarse) + real'(fine) / K_RATIO;
    tpd    = (i_mirr > 0.0) ? T0_NS / i_mirr : 1000.0;
  end

  initial begin
    for (int k = 0; k <= N_CELLS; k++) node[k] = 1'b0;
    n28a_q = 1'b0;
  end

  always @(din) node[0] = din;

  for (genvar k = 1; k <= N_CELLS; k++) begin : g_cell
    always @(node[k-1]) node[k] <= #(tpd) node[k-1];
  end

  always @(node[28]) n28a_q <= #(0.44 * tpd) node[28];

  assign dout = node[6'(sel)];
  assign n28  = node[28];
  assign n28a = n28a_q;
  assign n31  = node[31];
  assign n32  = node[N_CELLS];

endmodule
