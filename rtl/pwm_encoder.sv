// PWM (time) encoder of one cell value.
//
// A digital comparator between the stored 8-bit value (input U or state X)
// and the cycle ramp carried on the row bus. On each enc_strobe the result is
// latched: the encoded bit is 0 when the value is greater than the ramp and 1
// otherwise, as the encoder is described. Over a full ramp the bit is thus a
// pulse whose width encodes the value, and it is shared with every neighbour
// of the cell. Latching the bit (rather than using the comparator directly)
// keeps it stable while the bus carries the inner ramp; that is this design's
// reading of the "Comparator, Latch" pair in the cell diagram.
//
// Timing: pwm changes on the clock edge at which enc_strobe is high.
module pwm_encoder #(
  parameter int DW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          enc_strobe,
  input  logic [DW-1:0] value,
  input  logic [DW-1:0] ramp,
  output logic          pwm
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          pwm <= 1'b0;
    else if (enc_strobe) pwm <= (value > ramp) ? 1'b0 : 1'b1;
  end
endmodule
