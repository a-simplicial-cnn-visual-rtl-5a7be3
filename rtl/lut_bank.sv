// One program bank: the input function table G (512 bits), the state
// function table F (512 bits) and the FoG composition function (4-bit truth
// table, see fog_unit).
//
// The tables are written by the host one byte at a time: table bit a lives in
// byte a / 8, bit a % 8. For the broadcast, a read of inner-ramp value r
// returns both halves of each table at once, {T[256 + r], T[r]}, so the cells
// can pick either with bit 9 of their neighbourhood word.
//
// Timing: synchronous read; g_bits and f_bits are valid the cycle after
// rd_en. A write and a read of the same byte in one cycle return the old data.
module lut_bank
  import scnn_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  // host write port
  input  logic            we,
  input  logic            wsel_f,     // 0: G table, 1: F table
  input  logic [5:0]      waddr,      // byte address
  input  logic [7:0]      wdata,
  input  logic            fog_we,
  input  logic [3:0]      fog_wdata,
  // broadcast read port
  input  logic            rd_en,
  input  logic [IR_W-1:0] rd_addr,    // inner ramp value r
  output logic [1:0]      g_bits,     // {G[256 + r], G[r]}
  output logic [1:0]      f_bits,     // {F[256 + r], F[r]}
  output logic [3:0]      fog_tt
);
  localparam int HALF = LUT_BYTES / 2;

  logic [7:0] g_mem [LUT_BYTES];
  logic [7:0] f_mem [LUT_BYTES];

  always_ff @(posedge clk) begin
    if (we && !wsel_f) g_mem[waddr] <= wdata;
    if (we &&  wsel_f) f_mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (rd_en) begin
      g_bits <= {g_mem[HALF + 32'(rd_addr[IR_W-1:3])][rd_addr[2:0]],
                 g_mem[32'(rd_addr[IR_W-1:3])][rd_addr[2:0]]};
      f_bits <= {f_mem[HALF + 32'(rd_addr[IR_W-1:3])][rd_addr[2:0]],
                 f_mem[32'(rd_addr[IR_W-1:3])][rd_addr[2:0]]};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      fog_tt <= '0;
    else if (fog_we) fog_tt <= fog_wdata;
  end
endmodule
