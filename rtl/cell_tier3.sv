// Tier-3 (top tier) half of an S-CNN cell: everything that concerns the input u.
//
// Holds the 8-bit input register U, which is loaded either from the row bus
// when the cell is selected (sync.load_u and sel), or by the single-slope A/D
// converter: after sync.pd_sample arms it, the cell latches the A/D digital
// ramp on the bus at the first cycle in which the analog comparator adc_cmp
// is high. If it never trips, the last ramp value (sync.adc_last) is latched
// (this design's choice). The pwm_encoder turns U into the time-coded bit
// UPwm against the cycle ramp; the nine UPwm bits of the sphere of influence
// (nbr_upwm, built by the array) form W_u, and the vertex_latch picks G(W_u)
// from the inner-ramp broadcast on the 2-bit G bus. That single bit, g_via,
// is the only signal that goes to tier 2 (one 3D via per cell).
//
// Interface: row bus, G bus and sync lines are shared by the row; u_out goes
// to the column output bus. Timing: all outputs are registered.
module cell_tier3
  import scnn_pkg::*;
#(
  parameter int DW = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  sync_t            sync,
  input  logic [DW-1:0]    bus,
  input  logic [1:0]       g_bus,
  input  logic             sel,
  input  logic             adc_cmp,
  input  logic [NEIGH-1:0] nbr_upwm,
  output logic             upwm,
  output logic             g_via,
  output logic [DW-1:0]    u_out
);
  if (DW < IR_W) begin : g_dw_check
    $error("cell_tier3: DW must be at least the inner ramp width");
  end

  logic [DW-1:0] u_q;
  logic          adc_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      u_q      <= '0;
      adc_done <= 1'b1;
    end else begin
      if (sync.pd_sample) adc_done <= 1'b0;
      if (sync.load_u && sel) begin
        u_q <= bus;
      end else if (sync.adc_ramp && !adc_done && (adc_cmp || sync.adc_last)) begin
        u_q      <= bus;
        adc_done <= 1'b1;
      end
    end
  end

  pwm_encoder #(.DW(DW)) u_enc (
    .clk, .rst_n,
    .enc_strobe (sync.enc_strobe),
    .value      (u_q),
    .ramp       (bus),
    .pwm        (upwm)
  );

  vertex_latch g_latch (
    .clk, .rst_n,
    .eval_en    (sync.eval_en),
    .inner_ramp (bus[IR_W-1:0]),
    .w          (nbr_upwm),
    .mem_bits   (g_bus),
    .val        (g_via)
  );

  assign u_out = u_q;
endmodule
