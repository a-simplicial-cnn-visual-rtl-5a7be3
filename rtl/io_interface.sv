// I/O interface: the host's single command port into the processor.
//
// It loads data into the input or state register of one cell, reads U or X
// of one cell back through the column output buses, programs the G and F
// tables and FoG function of the program banks, writes the state machine's
// configuration registers and starts a program cycle or an A/D conversion.
//
// Host port: a command (host_op, host_addr, host_wdata) is taken in a cycle
// in which host_valid and host_ready are both high. Address fields:
//   cell ops      addr[15:8] = row, addr[7:0] = column
//   OP_WR_LUT     addr[15:8] = bank, addr[6] = table (0 G, 1 F), addr[5:0] = byte
//   OP_WR_FOG     addr[15:8] = bank, wdata[3:0] = truth table
//   OP_WR_CFG     addr[1:0]  = register (cfg_addr_e)
// Reads return host_rdata with host_rvalid one cycle after they are taken.
// While the scheduler is busy the cell rows and the active bank are in use,
// so only OP_RD_STAT and table writes to a bank other than the active one
// are taken; this lets the host reprogram one bank while another runs.
// The command set and its encoding are this design's; the document names
// only the four kinds of access.
module io_interface
  import scnn_pkg::*;
#(
  parameter int ROWS   = 14,
  parameter int COLS   = 14,
  parameter int DW     = 8,
  parameter int NBANKS = 4
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // host port
  input  logic                      host_valid,
  output logic                      host_ready,
  input  host_op_e                  host_op,
  input  logic [15:0]               host_addr,
  input  logic [7:0]                host_wdata,
  output logic                      host_rvalid,
  output logic [7:0]                host_rdata,
  // cell array access
  output logic [ROWS-1:0]           row_sel,
  output logic [COLS-1:0]           col_sel,
  output logic                      load_u,
  output logic                      load_x,
  output logic                      out_x,
  output logic [DW-1:0]             wr_data,
  input  logic [COLS-1:0][DW-1:0]   col_out,
  // program memory write port
  output logic                      lut_we,
  output logic                      fog_we,
  output logic [$clog2(NBANKS)-1:0] wbank,
  output logic                      wsel_f,
  output logic [5:0]                waddr,
  output logic [7:0]                lut_wdata,
  output logic [3:0]                fog_wdata,
  // state machine
  output cfg_t                      cfg,
  output logic                      start_prog,
  output logic                      start_adc,
  input  logic                      busy
);
  localparam int BW = $clog2(NBANKS);

  logic       accept;
  logic       cell_op, rd_op, bank_op;
  logic [7:0] row, col;

  assign row     = host_addr[15:8];
  assign col     = host_addr[7:0];
  assign cell_op = host_op inside {OP_WR_U, OP_WR_X, OP_RD_U, OP_RD_X};
  assign rd_op   = host_op inside {OP_RD_U, OP_RD_X};
  assign bank_op = host_op inside {OP_WR_LUT, OP_WR_FOG};

  always_comb begin
    if (host_op == OP_RD_STAT) host_ready = 1'b1;
    else if (bank_op)          host_ready = !busy || (2'(wbank) != cfg.bank);
    else                       host_ready = !busy;
  end
  assign accept = host_valid && host_ready;

  always_comb begin
    for (int r = 0; r < ROWS; r++) row_sel[r] = accept && cell_op && (row == 8'(r));
    for (int c = 0; c < COLS; c++) col_sel[c] = accept && cell_op && (col == 8'(c));
  end
  assign load_u  = accept && (host_op == OP_WR_U);
  assign load_x  = accept && (host_op == OP_WR_X);
  assign out_x   = (host_op == OP_RD_X);
  assign wr_data = DW'(host_wdata);

  assign wbank      = host_addr[8 +: BW];
  assign wsel_f     = host_addr[6];
  assign waddr      = host_addr[5:0];
  assign lut_wdata  = host_wdata;
  assign fog_wdata  = host_wdata[3:0];
  assign lut_we     = accept && (host_op == OP_WR_LUT);
  assign fog_we     = accept && (host_op == OP_WR_FOG);
  assign start_prog = accept && (host_op == OP_RUN_PROG);
  assign start_adc  = accept && (host_op == OP_RUN_ADC);

  // Configuration registers.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg <= '0;
    end else if (accept && host_op == OP_WR_CFG) begin
      unique case (cfg_addr_e'(host_addr[1:0]))
        CFG_BANK:     cfg.bank       <= host_wdata[1:0];
        CFG_ITER:     cfg.iterations <= host_wdata;
        CFG_INT_TIME: cfg.int_time   <= host_wdata;
        CFG_BOUNDARY: {cfg.bnd_x, cfg.bnd_u} <= host_wdata[1:0];
        default: ;
      endcase
    end
  end

  // Read data: one column of the selected row, or the status.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      host_rvalid <= 1'b0;
      host_rdata  <= '0;
    end else begin
      host_rvalid <= accept && (rd_op || host_op == OP_RD_STAT);
      if (accept && rd_op) begin
        host_rdata <= '0;
        for (int c = 0; c < COLS; c++)
          if (col == 8'(c)) host_rdata <= 8'(col_out[c]);
      end else if (accept && host_op == OP_RD_STAT) begin
        host_rdata <= {7'd0, busy};
      end
    end
  end

  // Host rule: the two start commands are never taken while busy.
  always_ff @(posedge clk) begin
    if (rst_n) assert (!((start_prog || start_adc) && busy));
  end
endmodule
