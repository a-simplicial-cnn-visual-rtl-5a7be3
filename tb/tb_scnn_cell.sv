// Testbench for scnn_cell: one cell whose neighbourhood words hold its own
// PWM bits in the centre position (bit 4) and fixed random bits elsewhere.
// The testbench sequences a full 256-step program cycle and compares the new
// state with a software evaluation; it also converts a light level through
// the pixel model and the A/D latch.
module tb_scnn_cell;
  import scnn_pkg::*;
  logic clk = 0, rst_n = 0;
  sync_t sync;
  logic [7:0] bus, u_out, x_out, light;
  logic [1:0] g_bus, f_bus;
  logic [3:0] fog_tt;
  logic sel = 0, upwm, xpwm;
  logic [15:0] vramp;
  logic [8:0] nbr_upwm, nbr_xpwm, fix_u, fix_x;
  logic [511:0] gt, ft;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  scnn_cell #(.DW(8)) dut (.*);

  always_comb begin
    nbr_upwm = fix_u; nbr_upwm[4] = upwm;
    nbr_xpwm = fix_x; nbr_xpwm[4] = xpwm;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic load(input logic is_x, input logic [7:0] v);
    @(negedge clk); sel = 1; bus = v; sync.load_u = !is_x; sync.load_x = is_x;
    @(negedge clk); sel = 0; sync.load_u = 0; sync.load_x = 0;
  endtask

  initial begin
    logic [7:0] u, x;
    logic [8:0] wu, wx;
    int cnt, code, vh;
    sync = SYNC_IDLE; bus = 0; g_bus = 0; f_bus = 0; fog_tt = 0; light = 0; vramp = 0;
    fix_u = 0; fix_x = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 5; it++) begin
      u = 8'($urandom); x = 8'($urandom);
      fix_u = 9'($urandom); fix_x = 9'($urandom);
      for (int k = 0; k < 16; k++) begin gt[k*32 +: 32] = $urandom; ft[k*32 +: 32] = $urandom; end
      fog_tt = 4'($urandom);
      load(0, u); load(1, x);
      chk("loaded", u_out == u && x_out == x);
      @(negedge clk); sync.cnt_clear = 1; @(negedge clk); sync.cnt_clear = 0;
      cnt = 0;
      for (int s = 0; s < 256; s++) begin
        bus = 8'(s); sync.enc_strobe = 1; @(negedge clk); sync.enc_strobe = 0;
        for (int r = 0; r < 256; r++) begin
          sync.eval_en = 1; bus = 8'(r);
          g_bus = {gt[256 + r], gt[r]}; f_bus = {ft[256 + r], ft[r]};
          @(negedge clk);
        end
        sync.eval_en = 0;
        sync.fog_strobe = 1; @(negedge clk); sync.fog_strobe = 0;
        wu = fix_u; wu[4] = !(u > 8'(s));
        wx = fix_x; wx[4] = !(x > 8'(s));
        if (fog_tt[{ft[wx], gt[wu]}] && cnt < 255) cnt++;
      end
      sync.transfer = 1; @(negedge clk); sync.transfer = 0;
      chk("program cycle result", x_out == 8'(cnt));
      if (x_out != 8'(cnt)) $display("  got %0d expected %0d", x_out, cnt);
      chk("input unchanged", u_out == u);
      // A/D conversion of a light level; analog ramp = 256 * s + 128
      light = 8'($urandom);
      sync.pd_reset = 1; @(negedge clk); sync.pd_reset = 0;
      sync.pd_integrate = 1; repeat (100) @(negedge clk); sync.pd_integrate = 0;
      sync.pd_sample = 1; @(negedge clk); sync.pd_sample = 0;
      for (int s = 0; s < 256; s++) begin
        sync.adc_ramp = 1; sync.adc_last = (s == 255); bus = 8'(s); vramp = 16'(256 * s + 128);
        @(negedge clk);
      end
      sync.adc_ramp = 0; sync.adc_last = 0;
      vh = 65535 - 100 * int'(light); if (vh < 0) vh = 0;
      code = 255;
      for (int s = 255; s >= 0; s--) if (256 * s + 128 > vh) code = s;
      chk("A/D code", u_out == 8'(code));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
