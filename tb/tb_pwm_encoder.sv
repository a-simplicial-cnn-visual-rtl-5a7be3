// Testbench for pwm_encoder: random values and ramps; the encoded bit must be
// 0 when value > ramp and 1 otherwise, latched only on enc_strobe.
module tb_pwm_encoder;
  logic clk = 0, rst_n = 0, enc_strobe = 0, pwm;
  logic [7:0] value, ramp;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  pwm_encoder #(.DW(8)) dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    value = 0; ramp = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      value = 8'($urandom); ramp = (i % 7 == 0) ? value : 8'($urandom);
      enc_strobe = 1;
      exp = !(value > ramp);
      @(negedge clk);
      enc_strobe = 0;
      checks++; if (pwm !== exp) begin failures++; $display("FAIL v=%0d r=%0d pwm=%0b", value, ramp, pwm); end
      // no strobe: must hold even if the inputs change
      value = ~value; ramp = ~ramp;
      @(negedge clk);
      checks++; if (pwm !== exp) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
