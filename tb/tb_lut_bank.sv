// Testbench for lut_bank: random G and F tables written byte by byte; every
// inner-ramp read must return {T[256 + r], T[r]} one cycle later, and the FoG
// register must hold what was written.
module tb_lut_bank;
  import scnn_pkg::*;
  logic clk = 0, rst_n = 0, we = 0, wsel_f = 0, fog_we = 0, rd_en = 0;
  logic [5:0] waddr;
  logic [7:0] wdata, rd_addr;
  logic [3:0] fog_wdata, fog_tt;
  logic [1:0] g_bits, f_bits;
  logic [511:0] gt, ft;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  lut_bank dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    waddr = 0; wdata = 0; rd_addr = 0; fog_wdata = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 4; it++) begin
      for (int k = 0; k < 16; k++) begin gt[k*32 +: 32] = $urandom; ft[k*32 +: 32] = $urandom; end
      for (int b = 0; b < 128; b++) begin
        @(negedge clk);
        we = 1; wsel_f = b[6]; waddr = 6'(b);
        wdata = b[6] ? ft[(b % 64) * 8 +: 8] : gt[(b % 64) * 8 +: 8];
      end
      @(negedge clk); we = 0;
      fog_we = 1; fog_wdata = 4'(it * 5 + 3); @(negedge clk); fog_we = 0;
      checks++; if (fog_tt !== 4'(it * 5 + 3)) failures++;
      for (int r = 0; r < 256; r++) begin
        rd_en = 1; rd_addr = 8'(r);
        @(negedge clk);
        rd_en = 0;
        checks++;
        if (g_bits !== {gt[256 + r], gt[r]} || f_bits !== {ft[256 + r], ft[r]}) begin
          failures++; $display("FAIL r=%0d g=%b f=%b", r, g_bits, f_bits);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
