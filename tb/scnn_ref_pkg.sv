// Reference model of the S-CNN program cycle for the testbenches, written
// directly from the algorithm rather than from the RTL structure.
//
// For each cycle-ramp value s = 0..255 every cell's input and state are
// encoded as bits (1 when the value is not greater than s), the neighbourhood
// words W_u and W_x are formed in row-major order (north-west = bit 0,
// south-east = bit 8) with the boundary bits outside the array, and the cell
// counts the steps where tt[{F[W_x], G[W_u]}] is 1, saturating at 255. The
// count becomes the new state.
package scnn_ref_pkg;
  localparam int MAXN = 16;
  typedef logic [7:0] grid_t [MAXN][MAXN];

  function automatic logic [8:0] nbr_word(input logic p [MAXN][MAXN], input int rows, input int cols,
                                          input int r, input int c, input logic bnd);
    logic [8:0] w;
    for (int k = 0; k < 9; k++) begin
      int nr = r + k / 3 - 1, nc = c + k % 3 - 1;
      w[k] = (nr >= 0 && nr < rows && nc >= 0 && nc < cols) ? p[nr][nc] : bnd;
    end
    return w;
  endfunction

  // One cycle-ramp step: adds the step's FoG bit to cnt.
  function automatic void ref_step(input int rows, input int cols, input int s,
                                   input grid_t u, input grid_t x,
                                   input logic [511:0] g, input logic [511:0] f, input logic [3:0] tt,
                                   input logic bu, input logic bx, inout int cnt [MAXN][MAXN]);
    logic pu [MAXN][MAXN];
    logic px [MAXN][MAXN];
    for (int r = 0; r < rows; r++)
      for (int c = 0; c < cols; c++) begin
        pu[r][c] = !(int'(u[r][c]) > s);
        px[r][c] = !(int'(x[r][c]) > s);
      end
    for (int r = 0; r < rows; r++)
      for (int c = 0; c < cols; c++) begin
        logic gv, fv;
        gv = g[nbr_word(pu, rows, cols, r, c, bu)];
        fv = f[nbr_word(px, rows, cols, r, c, bx)];
        if (tt[{fv, gv}] && cnt[r][c] < 255) cnt[r][c]++;
      end
  endfunction

  // A whole program cycle: x is replaced by the counts.
  function automatic void ref_cycle(input int rows, input int cols, input grid_t u, inout grid_t x,
                                    input logic [511:0] g, input logic [511:0] f, input logic [3:0] tt,
                                    input logic bu, input logic bx);
    int cnt [MAXN][MAXN];
    for (int r = 0; r < MAXN; r++) for (int c = 0; c < MAXN; c++) cnt[r][c] = 0;
    for (int s = 0; s < 256; s++) ref_step(rows, cols, s, u, x, g, f, tt, bu, bx, cnt);
    for (int r = 0; r < rows; r++) for (int c = 0; c < cols; c++) x[r][c] = 8'(cnt[r][c]);
  endfunction
endpackage
