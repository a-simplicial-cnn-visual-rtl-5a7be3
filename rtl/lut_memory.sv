// Program memory of the state machine: NBANKS program banks (four, arranged
// as two double banks), each a lut_bank with its own G, F and FoG function.
//
// The host writes any bank through the write port. The broadcast port reads
// the bank chosen by bank_sel: for each inner-ramp value r issued with rd_en,
// one cycle later it presents the inner-ramp value itself (bc_ramp), the two
// G bits and two F bits for r, and bc_valid. The broadcast ramp is delayed
// together with the data so both reach the row buses in the same cycle.
// fog_tt is the FoG function of the selected bank.
//
// Grouping the banks in pairs has no effect on the logic here; the pair index
// is bank[1] and the bank within the pair is bank[0].
module lut_memory
  import scnn_pkg::*;
#(
  parameter int NBANKS = 4
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      we,
  input  logic [$clog2(NBANKS)-1:0] wbank,
  input  logic                      wsel_f,
  input  logic [5:0]                waddr,
  input  logic [7:0]                wdata,
  input  logic                      fog_we,
  input  logic [3:0]                fog_wdata,
  input  logic [$clog2(NBANKS)-1:0] bank_sel,
  input  logic                      rd_en,
  input  logic [IR_W-1:0]           rd_addr,
  output logic                      bc_valid,
  output logic [IR_W-1:0]           bc_ramp,
  output logic [1:0]                g_bits,
  output logic [1:0]                f_bits,
  output logic [3:0]                fog_tt
);
  logic [NBANKS-1:0][1:0] g_b, f_b;
  logic [NBANKS-1:0][3:0] tt_b;

  for (genvar b = 0; b < NBANKS; b++) begin : g_bank
    lut_bank bank (
      .clk, .rst_n,
      .we        (we && (wbank == b)),
      .wsel_f,
      .waddr,
      .wdata,
      .fog_we    (fog_we && (wbank == b)),
      .fog_wdata,
      .rd_en     (rd_en && (bank_sel == b)),
      .rd_addr,
      .g_bits    (g_b[b]),
      .f_bits    (f_b[b]),
      .fog_tt    (tt_b[b])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bc_valid <= 1'b0;
      bc_ramp  <= '0;
    end else begin
      bc_valid <= rd_en;
      bc_ramp  <= rd_addr;
    end
  end

  assign g_bits = g_b[bank_sel];
  assign f_bits = f_b[bank_sel];
  assign fog_tt = tt_b[bank_sel];
endmodule
