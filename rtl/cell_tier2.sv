// Tier-2 half of an S-CNN cell: everything that concerns the state x, plus
// the FoG logic and the integration counter.
//
// Holds the 8-bit state register X, loaded from the row bus when the cell is
// selected (sync.load_x and sel) or from the integration counter at the end
// of a program cycle (sync.transfer). The pwm_encoder turns X into XPwm
// against the cycle ramp; the nine XPwm bits of the sphere of influence
// (nbr_xpwm) form W_x, and the vertex_latch picks F(W_x) from the 2-bit F bus.
// The fog_unit combines F(W_x) with G(W_u), which arrives from tier 3 as the
// single bit g_via, and the integ_counter adds the result on each
// sync.fog_strobe. The split of parts between the tiers follows the cell
// description; the encodings are this design's.
//
// Timing: all outputs are registered; X takes the counter value on the clock
// edge at which sync.transfer is high.
module cell_tier2
  import scnn_pkg::*;
#(
  parameter int DW = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  sync_t            sync,
  input  logic [DW-1:0]    bus,
  input  logic [1:0]       f_bus,
  input  logic [3:0]       fog_tt,
  input  logic             sel,
  input  logic             g_via,
  input  logic [NEIGH-1:0] nbr_xpwm,
  output logic             xpwm,
  output logic [DW-1:0]    x_out
);
  if (DW < IR_W) begin : g_dw_check
    $error("cell_tier2: DW must be at least the inner ramp width");
  end

  logic [DW-1:0] x_q;
  logic [DW-1:0] count;
  logic          f_val;
  logic          fog;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  x_q <= '0;
    else if (sync.load_x && sel) x_q <= bus;
    else if (sync.transfer)      x_q <= count;
  end

  pwm_encoder #(.DW(DW)) x_enc (
    .clk, .rst_n,
    .enc_strobe (sync.enc_strobe),
    .value      (x_q),
    .ramp       (bus),
    .pwm        (xpwm)
  );

  vertex_latch f_latch (
    .clk, .rst_n,
    .eval_en    (sync.eval_en),
    .inner_ramp (bus[IR_W-1:0]),
    .w          (nbr_xpwm),
    .mem_bits   (f_bus),
    .val        (f_val)
  );

  fog_unit fog_op (
    .f  (f_val),
    .g  (g_via),
    .tt (fog_tt),
    .y  (fog)
  );

  integ_counter #(.DW(DW)) counter (
    .clk, .rst_n,
    .clear      (sync.cnt_clear),
    .fog_strobe (sync.fog_strobe),
    .bit_in     (fog),
    .count
  );

  assign x_out = x_q;
endmodule
