// Digital ramp generator: a W-bit counter that the state machine steps from
// 0 to 2^W - 1. The same block serves the A/D ramp, the cycle ramp that the
// encoders compare against, and the inner ramp that addresses the program
// memory.
//
// clear sets the ramp to 0 (and wins over step); step advances it by one,
// wrapping to 0 after the top value. last is high while the ramp is at its
// top value. Timing: value changes on the clock edge at which clear or step
// is high.
module ramp_gen #(
  parameter int W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         step,
  output logic [W-1:0] value,
  output logic         last
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     value <= '0;
    else if (clear) value <= '0;
    else if (step)  value <= value + 1'b1;
  end
  assign last = (value == '1);
endmodule
