// Testbench for io_interface: decodes every host operation, checks the cell
// selects and load strobes, the program-memory write fields, the
// configuration registers, the read path through a fake column bus (value =
// column * 17 + 3 for U, plus 100 for X) and the busy rules, including a table
// write to an inactive bank taken while busy.
module tb_io_interface;
  import scnn_pkg::*;
  localparam int ROWS = 14, COLS = 14;
  logic clk = 0, rst_n = 0;
  logic host_valid = 0, host_ready, host_rvalid;
  host_op_e host_op;
  logic [15:0] host_addr;
  logic [7:0] host_wdata, host_rdata;
  logic [ROWS-1:0] row_sel;
  logic [COLS-1:0] col_sel;
  logic load_u, load_x, out_x;
  logic [7:0] wr_data;
  logic [COLS-1:0][7:0] col_out;
  logic lut_we, fog_we, wsel_f;
  logic [1:0] wbank;
  logic [5:0] waddr;
  logic [7:0] lut_wdata;
  logic [3:0] fog_wdata;
  cfg_t cfg;
  logic start_prog, start_adc, busy = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  io_interface #(.ROWS(ROWS), .COLS(COLS), .DW(8), .NBANKS(4)) dut (.*);

  always_comb
    for (int c = 0; c < COLS; c++) col_out[c] = 8'(c * 17 + 3 + (out_x ? 100 : 0));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int r, c;
    host_op = OP_NOP; host_addr = 0; host_wdata = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      r = $urandom % ROWS; c = $urandom % COLS;
      @(negedge clk);
      host_valid = 1; host_addr = {8'(r), 8'(c)}; host_wdata = 8'($urandom);
      host_op = (i % 2) ? OP_WR_U : OP_WR_X;
      #1;
      chk("ready", host_ready);
      chk("row select", row_sel == (ROWS'(1) << r));
      chk("col select", col_sel == (COLS'(1) << c));
      chk("load strobes", load_u == (i % 2 == 1) && load_x == (i % 2 == 0));
      chk("write data", wr_data == host_wdata);
      chk("no other strobes", !lut_we && !fog_we && !start_prog && !start_adc);
      // read back
      @(negedge clk);
      host_op = (i % 2) ? OP_RD_U : OP_RD_X;
      #1; chk("read row select", row_sel == (ROWS'(1) << r) && !load_u && !load_x);
      @(negedge clk);
      host_valid = 0;
      chk("rvalid", host_rvalid);
      chk("rdata", host_rdata == 8'(c * 17 + 3 + ((i % 2) ? 0 : 100)));
    end
    // table write
    @(negedge clk);
    host_valid = 1; host_op = OP_WR_LUT; host_addr = {8'd2, 1'b0, 1'b1, 6'd45}; host_wdata = 8'hA5;
    #1; chk("lut write", lut_we && wbank == 2 && wsel_f && waddr == 45 && lut_wdata == 8'hA5 && row_sel == 0);
    @(negedge clk);
    host_op = OP_WR_FOG; host_addr = 16'h0300; host_wdata = 8'h0B;
    #1; chk("fog write", fog_we && wbank == 3 && fog_wdata == 4'hB && !lut_we);
    // configuration
    @(negedge clk); host_op = OP_WR_CFG; host_addr = 16'(CFG_BANK); host_wdata = 8'd1;
    @(negedge clk); host_addr = 16'(CFG_ITER); host_wdata = 8'd7;
    @(negedge clk); host_addr = 16'(CFG_INT_TIME); host_wdata = 8'd99;
    @(negedge clk); host_addr = 16'(CFG_BOUNDARY); host_wdata = 8'd2;
    @(negedge clk); host_valid = 0;
    chk("config", cfg.bank == 1 && cfg.iterations == 7 && cfg.int_time == 99 && !cfg.bnd_u && cfg.bnd_x);
    // starts
    host_valid = 1; host_op = OP_RUN_PROG; #1; chk("start prog", start_prog && !start_adc);
    host_op = OP_RUN_ADC; #1; chk("start adc", start_adc && !start_prog);
    // busy rules
    @(negedge clk);
    busy = 1; host_op = OP_WR_U; #1; chk("cell write blocked while busy", !host_ready && !load_u && row_sel == 0);
    host_op = OP_RUN_ADC; #1; chk("start blocked while busy", !host_ready && !start_adc);
    host_op = OP_WR_LUT; host_addr = {8'd1, 8'd0}; #1; chk("active bank blocked", !host_ready && !lut_we);
    host_addr = {8'd0, 8'd0}; #1; chk("other bank taken while busy", host_ready && lut_we);
    @(negedge clk);
    host_op = OP_RD_STAT; #1; chk("status ready", host_ready);
    @(negedge clk); host_valid = 0;
    chk("status read", host_rvalid && host_rdata == 8'd1);
    if (!(host_rvalid && host_rdata == 8'd1)) $display("  rvalid=%b rdata=%0d", host_rvalid, host_rdata);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
