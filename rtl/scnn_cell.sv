// One S-CNN cell, two tiers tall: the tier-3 half (input u, photodiode,
// G lookup) and the tier-2 half (state x, F lookup, FoG, counter), joined by
// the single one-bit signal g_via that stands for the cell's one 3D via.
//
// The pixel front end (photodiode, sample-and-hold, analog comparator) is a
// behavioural model; its comparator output drives the A/D latch of tier 3.
// Interface: row signals (bus, G and F buses, sync, fog_tt), the cell select,
// the 3x3 neighbourhood PWM words and this cell's own PWM bits, and U and X
// for the column output bus. Timing: as its two halves.
module scnn_cell
  import scnn_pkg::*;
#(
  parameter int DW = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  sync_t            sync,
  input  logic [DW-1:0]    bus,
  input  logic [1:0]       g_bus,
  input  logic [1:0]       f_bus,
  input  logic [3:0]       fog_tt,
  input  logic             sel,
  input  logic [7:0]       light,
  input  logic [15:0]      vramp,
  input  logic [NEIGH-1:0] nbr_upwm,
  input  logic [NEIGH-1:0] nbr_xpwm,
  output logic             upwm,
  output logic             xpwm,
  output logic [DW-1:0]    u_out,
  output logic [DW-1:0]    x_out
);
  logic adc_cmp;
  logic g_via;   // the cell's single tier-3 to tier-2 via

  pixel_frontend pixel (
    .clk,
    .pd_reset     (sync.pd_reset),
    .pd_integrate (sync.pd_integrate),
    .pd_sample    (sync.pd_sample),
    .light,
    .vramp,
    .cmp          (adc_cmp)
  );

  cell_tier3 #(.DW(DW)) tier3 (
    .clk, .rst_n, .sync, .bus, .g_bus, .sel, .adc_cmp, .nbr_upwm,
    .upwm, .g_via, .u_out
  );

  cell_tier2 #(.DW(DW)) tier2 (
    .clk, .rst_n, .sync, .bus, .f_bus, .fog_tt, .sel, .g_via, .nbr_xpwm,
    .xpwm, .x_out
  );
endmodule
