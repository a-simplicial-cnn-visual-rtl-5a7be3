// Testbench for integ_counter: random FoG bits against a software count,
// saturation at 255 and clear.
module tb_integ_counter;
  logic clk = 0, rst_n = 0, clear = 0, fog_strobe = 0, bit_in = 0;
  logic [7:0] count;
  int checks = 0, failures = 0, saturated = 0;
  always #5 clk = ~clk;

  integ_counter #(.DW(8)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 20; run++) begin
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      exp = 0;
      checks++; if (count !== 8'd0) failures++;
      for (int s = 0; s < 300; s++) begin
        fog_strobe = (run < 3) || (($urandom % 4) != 0);
        bit_in = (run < 3) ? 1'b1 : 1'($urandom);
        @(negedge clk);
        if (fog_strobe && bit_in && exp < 255) exp++;
        checks++; if (count !== 8'(exp)) begin failures++; $display("FAIL count=%0d exp=%0d", count, exp); end
      end
      fog_strobe = 0;
      if (exp == 255) saturated++;
    end
    checks++; if (saturated == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
