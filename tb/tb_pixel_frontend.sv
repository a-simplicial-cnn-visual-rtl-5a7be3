// Testbench for the pixel front-end model: after reset, N integration cycles
// and a sample, the comparator must switch exactly where the analog ramp
// passes VRST - N * light (clamped at 0).
module tb_pixel_frontend;
  logic clk = 0, pd_reset = 0, pd_integrate = 0, pd_sample = 0, cmp;
  logic [7:0] light;
  logic [15:0] vramp;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  pixel_frontend dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, v, l;
    vramp = 0;
    for (int it = 0; it < 40; it++) begin
      light = 8'($urandom);
      n = (it == 0) ? 400 : int'($urandom % 200);
      @(negedge clk); pd_reset = 1; @(negedge clk); pd_reset = 0;
      pd_integrate = 1; repeat (n) @(negedge clk); pd_integrate = 0;
      pd_sample = 1; @(negedge clk); pd_sample = 0;
      // light changes after sampling must not matter
      l = int'(light);
      light = ~light;
      v = 65535 - n * l;
      if (v < 0) v = 0;
      for (int k = 0; k < 64; k++) begin
        vramp = 16'($urandom);
        if (k == 0) vramp = 16'(v);
        if (k == 1 && v < 65535) vramp = 16'(v + 1);
        #1;
        checks++; if (cmp !== (int'(vramp) > v)) begin failures++; $display("FAIL vramp=%0d v=%0d", vramp, v); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
