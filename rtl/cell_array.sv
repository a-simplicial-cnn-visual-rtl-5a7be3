// Cell array: ROWS x COLS identical S-CNN cells on a regular grid.
//
// Each row has its own 8-bit bus, 2-bit G and F buses and synchronisation
// lines, shared by all the cells of that row; each column has an output bus
// shared by the cells of that column, driven by the cell of the selected row
// (U or X, by out_x). The array wires the sphere of influence: every cell
// receives the UPwm bits (tier 3) and XPwm bits (tier 2) of itself and its
// eight neighbours, bit k of the word being neighbour k in row-major order
// from north-west (k = 0) to south-east (k = 8). Neighbours outside the array
// read the constant boundary bits bnd_u and bnd_x (this design's choice; the
// edge treatment is not described).
//
// A cell is selected for loading by row_sel[r] and col_sel[c] together.
// Timing: col_out is combinational from the cells' registers and row_sel.
module cell_array
  import scnn_pkg::*;
#(
  parameter int ROWS = 14,
  parameter int COLS = 14,
  parameter int DW   = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  sync_t   [ROWS-1:0]   sync,
  input  logic    [ROWS-1:0][DW-1:0] bus,
  input  logic    [ROWS-1:0][1:0]    g_bus,
  input  logic    [ROWS-1:0][1:0]    f_bus,
  input  logic    [3:0]        fog_tt,
  input  logic    [ROWS-1:0]   row_sel,
  input  logic    [COLS-1:0]   col_sel,
  input  logic                 out_x,
  input  logic                 bnd_u,
  input  logic                 bnd_x,
  input  logic    [ROWS-1:0][COLS-1:0][7:0] light,
  input  logic    [15:0]       vramp,
  output logic    [COLS-1:0][DW-1:0] col_out
);
  logic [ROWS-1:0][COLS-1:0]         upwm, xpwm;
  logic [ROWS-1:0][COLS-1:0][DW-1:0] u_out, x_out;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      logic [NEIGH-1:0] nbr_u, nbr_x;

      for (genvar k = 0; k < NEIGH; k++) begin : g_nbr
        localparam int NR = r + k / 3 - 1;
        localparam int NC = c + k % 3 - 1;
        if (NR >= 0 && NR < ROWS && NC >= 0 && NC < COLS) begin : g_in
          assign nbr_u[k] = upwm[NR][NC];
          assign nbr_x[k] = xpwm[NR][NC];
        end else begin : g_edge
          assign nbr_u[k] = bnd_u;
          assign nbr_x[k] = bnd_x;
        end
      end

      scnn_cell #(.DW(DW)) u_cell (
        .clk, .rst_n,
        .sync     (sync[r]),
        .bus      (bus[r]),
        .g_bus    (g_bus[r]),
        .f_bus    (f_bus[r]),
        .fog_tt,
        .sel      (row_sel[r] & col_sel[c]),
        .light    (light[r][c]),
        .vramp,
        .nbr_upwm (nbr_u),
        .nbr_xpwm (nbr_x),
        .upwm     (upwm[r][c]),
        .xpwm     (xpwm[r][c]),
        .u_out    (u_out[r][c]),
        .x_out    (x_out[r][c])
      );
    end
  end

  // Column output buses: the selected row drives each column.
  always_comb begin
    col_out = '0;
    for (int r = 0; r < ROWS; r++) begin
      for (int c = 0; c < COLS; c++) begin
        if (row_sel[r]) col_out[c] = col_out[c] | (out_x ? x_out[r][c] : u_out[r][c]);
      end
    end
  end
endmodule
