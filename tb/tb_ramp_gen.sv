// Testbench for ramp_gen: counts 0..255 under step, raises last at 255,
// wraps, holds without step and clears.
module tb_ramp_gen;
  logic clk = 0, rst_n = 0, clear = 0, step = 0, last;
  logic [7:0] value;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  ramp_gen #(.W(8)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    exp = 0;
    for (int i = 0; i < 700; i++) begin
      step = (i % 5) != 3;
      checks++; if (value !== 8'(exp) || last !== (exp == 255)) begin failures++; $display("FAIL v=%0d exp=%0d", value, exp); end
      @(negedge clk);
      if (step) exp = (exp + 1) % 256;
    end
    step = 1; clear = 1; @(negedge clk); clear = 0; step = 0;
    checks++; if (value !== 8'd0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
