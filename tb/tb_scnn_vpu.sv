// End-to-end testbench of the S-CNN visual processor at its default size
// (14 x 14 cells, four program banks), driven only through the host port.
//
// It programs banks, loads random images cell by cell, runs program cycles
// and reads every cell back, comparing with the reference model; it checks
// the length of a program cycle; it reprograms an idle bank while another
// runs; it converts a light image through the pixel models with an analog
// ramp that follows the digital ramp (vramp = 256 * dramp + 128), including
// dark pixels that never trip the comparator; and it runs a program that
// saturates the counters. Each of these mechanisms is counted and must occur.
module tb_scnn_vpu;
  import scnn_pkg::*;
  import scnn_ref_pkg::*;
  localparam int ROWS = 14, COLS = 14;
  localparam int PROG_CYCLES = 2 + 259 * 256;

  logic clk = 0, rst_n = 0;
  logic host_valid = 0, host_ready, host_rvalid;
  host_op_e host_op = OP_NOP;
  logic [15:0] host_addr = 0;
  logic [7:0] host_wdata = 0, host_rdata;
  logic [ROWS-1:0][COLS-1:0][7:0] light;
  logic [15:0] vramp;
  logic [7:0] dramp;
  logic adc_active, busy, done;

  int checks = 0, failures = 0;
  int n_load = 0, n_read = 0, n_prog = 0, n_multi = 0, n_stall = 0, n_busy_write = 0;
  int n_adc = 0, n_dark = 0, n_sat = 0, n_bank_switch = 0, n_boundary = 0;
  int busy_cycles = 0;
  logic [3:0][511:0] gt, ft;
  logic [3:0][3:0] tt;
  grid_t u, x;

  always #5 clk = ~clk;
  always_comb vramp = adc_active ? 16'(256 * int'(dramp) + 128) : 16'd0;
  always @(posedge clk) if (busy) busy_cycles++;

  scnn_vpu dut (.*);

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic host(input host_op_e op, input logic [15:0] addr, input logic [7:0] data,
                      output logic [7:0] rdata);
    @(negedge clk);
    host_valid = 1; host_op = op; host_addr = addr; host_wdata = data;
    #1;
    while (!host_ready) begin n_stall++; @(negedge clk); #1; end
    @(negedge clk);
    host_valid = 0; host_op = OP_NOP;
    rdata = host_rdata;
    if (op inside {OP_RD_U, OP_RD_X, OP_RD_STAT}) chk("read valid", host_rvalid);
  endtask

  task automatic wr(input host_op_e op, input logic [15:0] addr, input logic [7:0] data);
    logic [7:0] d;
    host(op, addr, data, d);
  endtask

  task automatic program_bank(input int b, input logic [3:0] fog);
    for (int k = 0; k < 16; k++) begin gt[b][k*32 +: 32] = $urandom; ft[b][k*32 +: 32] = $urandom; end
    tt[b] = fog;
    for (int i = 0; i < 64; i++) begin
      wr(OP_WR_LUT, {8'(b), 2'b00, 6'(i)}, gt[b][i*8 +: 8]);
      if (busy) n_busy_write++;
      wr(OP_WR_LUT, {8'(b), 2'b01, 6'(i)}, ft[b][i*8 +: 8]);
    end
    wr(OP_WR_FOG, {8'(b), 8'd0}, {4'd0, fog});
  endtask

  task automatic load_images();
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) begin
      u[r][c] = 8'($urandom); x[r][c] = 8'($urandom);
      wr(OP_WR_U, {8'(r), 8'(c)}, u[r][c]);
      wr(OP_WR_X, {8'(r), 8'(c)}, x[r][c]);
      n_load += 2;
    end
  endtask

  task automatic check_cells(input string what);
    logic [7:0] d;
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) begin
      host(OP_RD_X, {8'(r), 8'(c)}, 8'd0, d); n_read++;
      chk({what, " X"}, d == x[r][c]);
      if (d != x[r][c]) $display("  cell %0d,%0d X got %0d expected %0d", r, c, d, x[r][c]);
      host(OP_RD_U, {8'(r), 8'(c)}, 8'd0, d); n_read++;
      chk({what, " U"}, d == u[r][c]);
      if (d != u[r][c]) $display("  cell %0d,%0d U got %0d expected %0d", r, c, d, u[r][c]);
    end
  endtask

  task automatic wait_idle();
    logic [7:0] st;
    do host(OP_RD_STAT, 16'd0, 8'd0, st); while (st[0]);
  endtask

  // runs `iters` program cycles on bank b and updates the reference
  task automatic run_prog(input int b, input int iters, input logic bu, input logic bx, input int other_bank);
    int start;
    grid_t x0;
    wr(OP_WR_CFG, 16'(CFG_BANK), 8'(b));
    wr(OP_WR_CFG, 16'(CFG_ITER), 8'(iters));
    wr(OP_WR_CFG, 16'(CFG_BOUNDARY), {6'd0, bx, bu});
    if (bu || bx) n_boundary++;
    start = busy_cycles;
    wr(OP_RUN_PROG, 16'd0, 8'd0);
    if (other_bank >= 0) begin
      // the active bank is refused while busy, another bank is taken
      @(negedge clk);
      host_valid = 1; host_op = OP_WR_LUT; host_addr = {8'(b), 8'd0}; #1;
      chk("active bank refused while busy", !host_ready);
      host_valid = 0;
      program_bank(other_bank, 4'b1111);
    end else begin
      // a cell access waits for the end of the operation
      logic [7:0] d;
      host(OP_RD_STAT, 16'd0, 8'd0, d);
      chk("busy reported", d[0]);
      host(OP_RD_X, 16'd0, 8'd0, d);
    end
    wait_idle();
    chk("program cycle length", busy_cycles - start == iters * PROG_CYCLES);
    if (busy_cycles - start != iters * PROG_CYCLES)
      $display("  took %0d cycles, expected %0d", busy_cycles - start, iters * PROG_CYCLES);
    for (int i = 0; i < iters; i++) begin
      x0 = x;
      ref_cycle(ROWS, COLS, u, x, gt[b], ft[b], tt[b], bu, bx);
      for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) if (x[r][c] == 8'd255) n_sat++;
    end
    n_prog += iters;
    if (iters > 1) n_multi++;
  endtask

  initial begin
    int last_bank;
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) light[r][c] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    program_bank(0, 4'($urandom));
    program_bank(1, 4'b1110);
    load_images();
    check_cells("after load");
    run_prog(0, 1, 1'b0, 1'b0, -1);
    check_cells("bank 0 program cycle");
    run_prog(1, 2, 1'b1, 1'b1, 2);     // bank 2 is programmed meanwhile
    n_bank_switch++;
    check_cells("bank 1 two program cycles");
    // imager mode: A/D conversion of a light image
    wr(OP_WR_CFG, 16'(CFG_INT_TIME), 8'd200);
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++)
      light[r][c] = ((r + c) % 9 == 0) ? 8'd0 : 8'($urandom);
    wr(OP_RUN_ADC, 16'd0, 8'd0);
    wait_idle();
    n_adc++;
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) begin
      int vh, code;
      vh = 65535 - 200 * int'(light[r][c]); if (vh < 0) vh = 0;
      code = -1;
      for (int s = 255; s >= 0; s--) if (256 * s + 128 > vh) code = s;
      if (code < 0) begin code = 255; n_dark++; end
      u[r][c] = 8'(code);
    end
    check_cells("after A/D conversion");
    // program on the converted image with the bank written while busy
    run_prog(2, 1, 1'b0, 1'b1, -1);
    n_bank_switch++;
    check_cells("bank 2 program cycle");
    // mechanisms
    chk("direct loads happened", n_load > 0);
    chk("readouts happened", n_read > 0);
    chk("program cycles happened", n_prog >= 4);
    chk("multi-iteration run happened", n_multi > 0);
    chk("host stalls happened", n_stall > 0);
    chk("bank written while busy", n_busy_write > 0);
    chk("bank switch happened", n_bank_switch > 0);
    chk("A/D conversion happened", n_adc > 0);
    chk("dark pixel forced latch happened", n_dark > 0);
    chk("counter saturation happened", n_sat > 0);
    chk("boundary bits used", n_boundary > 0);
    $display("mechanisms: loads=%0d reads=%0d prog_cycles=%0d multi=%0d stalls=%0d busy_writes=%0d bank_switches=%0d adc=%0d dark=%0d saturated=%0d boundary=%0d",
             n_load, n_read, n_prog, n_multi, n_stall, n_busy_write, n_bank_switch, n_adc, n_dark, n_sat, n_boundary);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
