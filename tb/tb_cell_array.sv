// Testbench for cell_array at 4 x 5 cells: the testbench plays the state
// machine. It loads random inputs and states cell by cell, runs full program
// cycles with random G/F tables, FoG functions and boundary bits, reads every
// state back through the column buses and compares with the reference model.
// It also runs one A/D conversion of a random light image.
module tb_cell_array;
  import scnn_pkg::*;
  import scnn_ref_pkg::*;
  localparam int ROWS = 4, COLS = 5;
  logic clk = 0, rst_n = 0;
  sync_t [ROWS-1:0] sync;
  sync_t s1;
  logic [ROWS-1:0][7:0] bus;
  logic [7:0] b1;
  logic [ROWS-1:0][1:0] g_bus, f_bus;
  logic [1:0] g1, f1;
  logic [3:0] fog_tt;
  logic [ROWS-1:0] row_sel = 0;
  logic [COLS-1:0] col_sel = 0;
  logic out_x = 0, bnd_u = 0, bnd_x = 0;
  logic [ROWS-1:0][COLS-1:0][7:0] light;
  logic [15:0] vramp;
  logic [COLS-1:0][7:0] col_out;
  logic [511:0] gt, ft;
  grid_t u, x;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  // all rows carry the same signals
  always_comb for (int r = 0; r < ROWS; r++) begin
    sync[r] = s1; bus[r] = b1; g_bus[r] = g1; f_bus[r] = f1;
  end

  cell_array #(.ROWS(ROWS), .COLS(COLS), .DW(8)) dut (.*);

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic load(input logic is_x, input int r, input int c, input logic [7:0] v);
    @(negedge clk);
    row_sel = ROWS'(1) << r; col_sel = COLS'(1) << c; b1 = v;
    s1.load_u = !is_x; s1.load_x = is_x;
    @(negedge clk);
    row_sel = 0; col_sel = 0; s1.load_u = 0; s1.load_x = 0;
  endtask

  task automatic read_row(input logic is_x, input int r);
    row_sel = ROWS'(1) << r; out_x = is_x;
    #1;
  endtask

  initial begin
    s1 = SYNC_IDLE; b1 = 0; g1 = 0; f1 = 0; fog_tt = 0; vramp = 0; light = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 3; it++) begin
      for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) begin
        u[r][c] = 8'($urandom); x[r][c] = 8'($urandom);
        load(0, r, c, u[r][c]); load(1, r, c, x[r][c]);
      end
      for (int k = 0; k < 16; k++) begin gt[k*32 +: 32] = $urandom; ft[k*32 +: 32] = $urandom; end
      fog_tt = (it == 0) ? 4'b0110 : 4'($urandom);
      bnd_u = it[0]; bnd_x = it[1];
      // check loads through the column buses
      for (int r = 0; r < ROWS; r++) begin
        read_row(0, r);
        for (int c = 0; c < COLS; c++) chk("U readout", col_out[c] == u[r][c]);
        read_row(1, r);
        for (int c = 0; c < COLS; c++) chk("X readout", col_out[c] == x[r][c]);
      end
      @(negedge clk); row_sel = 0;
      // program cycle
      s1.cnt_clear = 1; @(negedge clk); s1.cnt_clear = 0;
      for (int s = 0; s < 256; s++) begin
        b1 = 8'(s); s1.enc_strobe = 1; @(negedge clk); s1.enc_strobe = 0;
        for (int r = 0; r < 256; r++) begin
          s1.eval_en = 1; b1 = 8'(r); g1 = {gt[256 + r], gt[r]}; f1 = {ft[256 + r], ft[r]};
          @(negedge clk);
        end
        s1.eval_en = 0;
        s1.fog_strobe = 1; @(negedge clk); s1.fog_strobe = 0;
      end
      s1.transfer = 1; @(negedge clk); s1.transfer = 0;
      ref_cycle(ROWS, COLS, u, x, gt, ft, fog_tt, bnd_u, bnd_x);
      for (int r = 0; r < ROWS; r++) begin
        read_row(1, r);
        for (int c = 0; c < COLS; c++) begin
          chk("state after program cycle", col_out[c] == x[r][c]);
          if (col_out[c] != x[r][c]) $display("  cell %0d,%0d got %0d expected %0d", r, c, col_out[c], x[r][c]);
        end
      end
      @(negedge clk); row_sel = 0;
    end
    // A/D conversion of a random image: analog ramp = 256 * s + 128
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) light[r][c] = 8'($urandom);
    s1.pd_reset = 1; @(negedge clk); s1.pd_reset = 0;
    s1.pd_integrate = 1; repeat (200) @(negedge clk); s1.pd_integrate = 0;
    s1.pd_sample = 1; @(negedge clk); s1.pd_sample = 0;
    for (int s = 0; s < 256; s++) begin
      s1.adc_ramp = 1; s1.adc_last = (s == 255); b1 = 8'(s); vramp = 16'(256 * s + 128);
      @(negedge clk);
    end
    s1.adc_ramp = 0; s1.adc_last = 0;
    for (int r = 0; r < ROWS; r++) begin
      read_row(0, r);
      for (int c = 0; c < COLS; c++) begin
        int vh, code;
        vh = 65535 - 200 * int'(light[r][c]); if (vh < 0) vh = 0;
        code = 255;
        for (int s = 255; s >= 0; s--) if (256 * s + 128 > vh) code = s;
        chk("A/D image", col_out[c] == 8'(code));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
