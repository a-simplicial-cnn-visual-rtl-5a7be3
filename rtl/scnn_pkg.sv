// Shared types and constants of the S-CNN visual processor.
//
// A cell's sphere of influence is itself and its eight neighbours, so the
// neighbourhood word W has NEIGH = 9 bits and a G or F lookup table holds
// 2^9 = 512 bits. The low 8 bits of W are matched against the 8-bit inner
// ramp; bit 9 (index 8) picks the lower or higher of the two table bits that
// are broadcast together. Bit k of W is the PWM bit of neighbour k, counted in
// row-major order from the north-west cell (k = 0) to the south-east cell
// (k = 8); the cell itself is k = 4. That ordering is this design's choice.
//
// sync_t bundles the synchronisation lines that run along each cell row and
// tell the cells what the shared 8-bit row bus is carrying in a given cycle.
package scnn_pkg;

  localparam int NEIGH     = 9;              // cells in a sphere of influence
  localparam int IR_W      = NEIGH - 1;      // inner ramp width (8)
  localparam int LUT_BITS  = 1 << NEIGH;     // 512 bits per G or F table
  localparam int LUT_BYTES = LUT_BITS / 8;   // 64 host-writable bytes

  // Synchronisation lines of one cell row.
  typedef struct packed {
    logic load_u;      // bus carries host data for U of the selected cell
    logic load_x;      // bus carries host data for X of the selected cell
    logic enc_strobe;  // bus carries the cycle (digital) ramp: latch UPwm/XPwm
    logic eval_en;     // bus carries the inner ramp, 2-bit buses carry LUT bits
    logic fog_strobe;  // add FoG of the latched F and G to the counter
    logic cnt_clear;   // clear the integration counter (start of a program cycle)
    logic transfer;    // copy the counter into the state register X
    logic pd_reset;    // photodiode reset
    logic pd_integrate;// photodiode integrates
    logic pd_sample;   // sample-and-hold the photodiode voltage, arm the A/D latch
    logic adc_ramp;    // bus carries the A/D digital ramp
    logic adc_last;    // last A/D ramp value: latch it if the comparator never tripped
  } sync_t;

  localparam sync_t SYNC_IDLE = '0;

  // Host operations of the I/O interface.
  typedef enum logic [3:0] {
    OP_NOP      = 4'd0,
    OP_WR_U     = 4'd1,   // addr = {row, col}, wdata -> input register U
    OP_WR_X     = 4'd2,   // addr = {row, col}, wdata -> state register X
    OP_RD_U     = 4'd3,   // addr = {row, col}, rdata <- U
    OP_RD_X     = 4'd4,   // addr = {row, col}, rdata <- X
    OP_WR_LUT   = 4'd5,   // addr = {bank, table(0 = G, 1 = F), byte[5:0]}
    OP_WR_FOG   = 4'd6,   // addr = bank, wdata[3:0] = FoG truth table
    OP_WR_CFG   = 4'd7,   // addr = config register, wdata
    OP_RUN_PROG = 4'd8,   // run the configured number of program cycles
    OP_RUN_ADC  = 4'd9,   // run one A/D conversion cycle (imager mode)
    OP_RD_STAT  = 4'd10   // rdata = {7'b0, busy}
  } host_op_e;

  // Configuration registers (OP_WR_CFG address).
  typedef enum logic [1:0] {
    CFG_BANK     = 2'd0,  // active program bank
    CFG_ITER     = 2'd1,  // program cycles per OP_RUN_PROG (0 counts as 1)
    CFG_INT_TIME = 2'd2,  // photodiode integration time in clock cycles
    CFG_BOUNDARY = 2'd3   // wdata[0]: UPwm, wdata[1]: XPwm outside the array
  } cfg_addr_e;

  typedef struct packed {
    logic [1:0] bank;
    logic [7:0] iterations;
    logic [7:0] int_time;
    logic       bnd_u;
    logic       bnd_x;
  } cfg_t;

endpackage
