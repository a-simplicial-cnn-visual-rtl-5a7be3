// Testbench for cell_tier3: bus loading with and without select, the A/D
// latch (comparator trip and the never-trip case), UPwm encoding against the
// cycle ramp and the G lookup through an inner-ramp broadcast.
module tb_cell_tier3;
  import scnn_pkg::*;
  logic clk = 0, rst_n = 0;
  sync_t sync;
  logic [7:0] bus, u_out;
  logic [1:0] g_bus;
  logic sel = 0, adc_cmp = 0, upwm, g_via;
  logic [8:0] nbr_upwm;
  logic [511:0] gt;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  cell_tier3 #(.DW(8)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [7:0] v;
    int trip;
    sync = SYNC_IDLE; bus = 0; g_bus = 0; nbr_upwm = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 50; i++) begin
      v = 8'($urandom);
      @(negedge clk); sync.load_u = 1; sel = 1; bus = v;
      @(negedge clk); sync.load_u = 0; sel = 0;
      chk("load", u_out == v);
      @(negedge clk); sync.load_u = 1; sel = 0; bus = ~v;
      @(negedge clk); sync.load_u = 0;
      chk("no load without select", u_out == v);
      // encoder
      for (int k = 0; k < 8; k++) begin
        bus = (k == 0) ? v : 8'($urandom);
        sync.enc_strobe = 1; @(negedge clk); sync.enc_strobe = 0;
        chk("upwm", upwm == !(v > bus));
      end
      // A/D conversion: comparator trips at ramp value trip (256 = never)
      trip = (i % 10 == 0) ? 256 : int'($urandom % 256);
      sync.pd_sample = 1; @(negedge clk); sync.pd_sample = 0;
      for (int s = 0; s < 256; s++) begin
        sync.adc_ramp = 1; sync.adc_last = (s == 255); bus = 8'(s);
        adc_cmp = (s >= trip);
        @(negedge clk);
      end
      sync.adc_ramp = 0; sync.adc_last = 0; adc_cmp = 0;
      chk("adc code", u_out == 8'((trip > 255) ? 255 : trip));
      // G lookup
      for (int k = 0; k < 16; k++) gt[k*32 +: 32] = $urandom;
      nbr_upwm = 9'($urandom);
      for (int r = 0; r < 256; r++) begin
        sync.eval_en = 1; bus = 8'(r); g_bus = {gt[256 + r], gt[r]};
        @(negedge clk);
      end
      sync.eval_en = 0;
      chk("G lookup", g_via == gt[nbr_upwm]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
