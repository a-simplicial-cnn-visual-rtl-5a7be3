// Vertex latch: picks the value of a lookup-table function (G or F) at the
// vertex named by the cell's neighbourhood word W.
//
// The lookup table is not stored in the cell. Instead the memory broadcasts,
// while eval_en is high, every inner-ramp value r = 0..255 on the row bus
// together with two table bits on a 2-bit bus: mem_bits[0] = T[{0,r}] (lower
// half) and mem_bits[1] = T[{1,r}] (higher half). The cell compares W[7:0]
// with r (an 8-bit digital comparator) and, on a match, latches the bit chosen
// by W[8] (the multiplexer controlled by bit 9 of W). Since W[7:0] always
// equals exactly one r, one sweep of the inner ramp latches T[W] once.
// Broadcasting two bits halves the sweep from 512 to 256 cycles.
//
// Timing: val is updated on the clock edge of the matching cycle and holds
// until the next match.
module vertex_latch
  import scnn_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             eval_en,
  input  logic [IR_W-1:0]  inner_ramp,
  input  logic [NEIGH-1:0] w,
  input  logic [1:0]       mem_bits,
  output logic             val
);
  logic match;
  assign match = eval_en && (w[IR_W-1:0] == inner_ramp);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     val <= 1'b0;
    else if (match) val <= w[NEIGH-1] ? mem_bits[1] : mem_bits[0];
  end
endmodule
