// S-CNN visual processor: a SIMD array of Simplicial CNN cells.
//
// Every cell evaluates, in parallel with all others, the composition
// FoG(W_x, W_u) of two piecewise-linear functions of its 3x3 neighbourhood,
// with the inputs u and states x time-coded as PWM bits against a cycle ramp.
// The functions are not computed in the cells: they are 512-bit lookup tables
// held once in the state machine's program memory and broadcast to all cells
// by sweeping an inner ramp. Over a program cycle each cell counts the steps
// at which FoG is 1 and the count becomes its new 8-bit state.
//
// Parts: the cell array (cell_array), the state machine made of the program
// memory (lut_memory, four banks), the digital ramps and the scheduler
// (scheduler with ramp_gen), and the I/O interface (io_interface). The glue
// here drives each row's 8-bit bus with host data, the digital (cycle or A/D)
// ramp or the broadcast inner ramp, and the 2-bit G and F buses with the
// memory's two bits. All rows carry the same values; a cell is addressed by
// its row and column selects.
//
// Ports: the host command port (see io_interface); light, the modelled
// photocurrent of each pixel, and vramp, the modelled external analog ramp,
// which must follow dramp while adc_active is high; busy and done report the
// scheduler. Timing: see scheduler for the cycle counts of each operation.
module scnn_vpu
  import scnn_pkg::*;
#(
  parameter int ROWS   = 14,
  parameter int COLS   = 14,
  parameter int DW     = 8,
  parameter int NBANKS = 4
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            host_valid,
  output logic                            host_ready,
  input  host_op_e                        host_op,
  input  logic [15:0]                     host_addr,
  input  logic [7:0]                      host_wdata,
  output logic                            host_rvalid,
  output logic [7:0]                      host_rdata,
  input  logic [ROWS-1:0][COLS-1:0][7:0]  light,
  input  logic [15:0]                     vramp,
  output logic [DW-1:0]                   dramp,
  output logic                            adc_active,
  output logic                            busy,
  output logic                            done
);
  localparam int BW = $clog2(NBANKS);

  // I/O interface <-> rest
  logic [ROWS-1:0]         row_sel;
  logic [COLS-1:0]         col_sel;
  logic                    load_u, load_x, out_x;
  logic [DW-1:0]           wr_data;
  logic [COLS-1:0][DW-1:0] col_out;
  logic                    lut_we, fog_we, wsel_f;
  logic [BW-1:0]           wbank;
  logic [5:0]              waddr;
  logic [7:0]              lut_wdata;
  logic [3:0]              fog_wdata;
  cfg_t                    cfg;
  logic                    start_prog, start_adc;

  // scheduler and memory
  sync_t                   sched_sync, row_sync_v;
  logic                    drive_dramp;
  logic                    mem_rd_en;
  logic [IR_W-1:0]         mem_rd_addr;
  logic                    bc_valid;
  logic [IR_W-1:0]         bc_ramp;
  logic [1:0]              g_bits, f_bits;
  logic [3:0]              fog_tt;

  // row signals
  sync_t [ROWS-1:0]           row_sync;
  logic  [ROWS-1:0][DW-1:0]   row_bus;
  logic  [ROWS-1:0][1:0]      row_g, row_f;
  logic  [DW-1:0]             bus_v;

  io_interface #(.ROWS(ROWS), .COLS(COLS), .DW(DW), .NBANKS(NBANKS)) io (
    .clk, .rst_n,
    .host_valid, .host_ready, .host_op, .host_addr, .host_wdata,
    .host_rvalid, .host_rdata,
    .row_sel, .col_sel, .load_u, .load_x, .out_x, .wr_data, .col_out,
    .lut_we, .fog_we, .wbank, .wsel_f, .waddr, .lut_wdata, .fog_wdata,
    .cfg, .start_prog, .start_adc, .busy
  );

  scheduler #(.DW(DW)) sched (
    .clk, .rst_n, .start_prog, .start_adc, .cfg,
    .sync (sched_sync), .drive_dramp, .dramp, .mem_rd_en, .mem_rd_addr,
    .busy, .done
  );

  lut_memory #(.NBANKS(NBANKS)) mem (
    .clk, .rst_n,
    .we (lut_we), .wbank, .wsel_f, .waddr, .wdata (lut_wdata),
    .fog_we, .fog_wdata,
    .bank_sel (cfg.bank[BW-1:0]),
    .rd_en (mem_rd_en), .rd_addr (mem_rd_addr),
    .bc_valid, .bc_ramp, .g_bits, .f_bits, .fog_tt
  );

  // Row bus drivers.
  always_comb begin
    row_sync_v        = sched_sync;
    row_sync_v.eval_en = bc_valid;
    row_sync_v.load_u = load_u;
    row_sync_v.load_x = load_x;
    if (bc_valid)         bus_v = DW'(bc_ramp);
    else if (drive_dramp) bus_v = dramp;
    else                  bus_v = wr_data;
    for (int r = 0; r < ROWS; r++) begin
      row_sync[r] = row_sync_v;
      row_bus[r]  = bus_v;
      row_g[r]    = g_bits;
      row_f[r]    = f_bits;
    end
  end

  cell_array #(.ROWS(ROWS), .COLS(COLS), .DW(DW)) array (
    .clk, .rst_n,
    .sync (row_sync), .bus (row_bus), .g_bus (row_g), .f_bus (row_f), .fog_tt,
    .row_sel, .col_sel, .out_x, .bnd_u (cfg.bnd_u), .bnd_x (cfg.bnd_x),
    .light, .vramp, .col_out
  );

  assign adc_active = sched_sync.adc_ramp;
endmodule
