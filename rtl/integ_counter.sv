// Integration counter: accumulates the FoG bit over a program cycle.
//
// Cleared by clear at the start of a program cycle; on every fog_strobe it
// adds the FoG bit. A program cycle has 256 ramp steps but the result is an
// 8-bit value, so the count saturates at 2^DW - 1 (this design's choice).
// The count is later copied into the state register X.
//
// Timing: count is updated on the clock edge at which clear or fog_strobe is
// high; clear wins.
module integ_counter #(
  parameter int DW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          fog_strobe,
  input  logic          bit_in,
  output logic [DW-1:0] count
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                     count <= '0;
    else if (clear)                                 count <= '0;
    else if (fog_strobe && bit_in && (count != '1)) count <= count + 1'b1;
  end
endmodule
