// Testbench for lut_memory: four banks with different random tables; reads
// through each bank_sel must return that bank's bits, with bc_ramp and
// bc_valid one cycle after the read, and fog_tt of the selected bank.
module tb_lut_memory;
  import scnn_pkg::*;
  logic clk = 0, rst_n = 0, we = 0, wsel_f = 0, fog_we = 0, rd_en = 0, bc_valid;
  logic [1:0] wbank, bank_sel;
  logic [5:0] waddr;
  logic [7:0] wdata, rd_addr, bc_ramp;
  logic [3:0] fog_wdata, fog_tt;
  logic [1:0] g_bits, f_bits;
  logic [3:0][511:0] gt, ft;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  lut_memory #(.NBANKS(4)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    waddr = 0; wdata = 0; rd_addr = 0; fog_wdata = 0; wbank = 0; bank_sel = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int bk = 0; bk < 4; bk++) begin
      for (int k = 0; k < 16; k++) begin gt[bk][k*32 +: 32] = $urandom; ft[bk][k*32 +: 32] = $urandom; end
      for (int b = 0; b < 128; b++) begin
        @(negedge clk);
        we = 1; wbank = 2'(bk); wsel_f = b[6]; waddr = 6'(b);
        wdata = b[6] ? ft[bk][(b % 64) * 8 +: 8] : gt[bk][(b % 64) * 8 +: 8];
      end
      @(negedge clk); we = 0;
      fog_we = 1; fog_wdata = 4'(bk + 9); @(negedge clk); fog_we = 0;
    end
    for (int bk = 3; bk >= 0; bk--) begin
      bank_sel = 2'(bk);
      #1; checks++; if (fog_tt !== 4'(bk + 9)) failures++;
      for (int r = 0; r < 256; r++) begin
        rd_en = 1; rd_addr = 8'(r);
        @(negedge clk);
        rd_en = 0;
        checks++;
        if (!bc_valid || bc_ramp !== 8'(r) ||
            g_bits !== {gt[bk][256 + r], gt[bk][r]} || f_bits !== {ft[bk][256 + r], ft[bk][r]}) begin
          failures++; $display("FAIL bank=%0d r=%0d", bk, r);
        end
      end
      @(negedge clk);
      checks++; if (bc_valid) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
