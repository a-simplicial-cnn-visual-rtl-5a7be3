// Testbench for cell_tier2: state loading, XPwm encoding, the F lookup, and
// runs of ramp steps in which FoG(F, G) is integrated and finally transferred
// into the state register, against a software count (with saturation).
module tb_cell_tier2;
  import scnn_pkg::*;
  logic clk = 0, rst_n = 0;
  sync_t sync;
  logic [7:0] bus, x_out;
  logic [1:0] f_bus;
  logic [3:0] fog_tt;
  logic sel = 0, g_via = 0, xpwm;
  logic [8:0] nbr_xpwm;
  logic [511:0] ft;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  cell_tier2 #(.DW(8)) dut (.*);

  initial begin
    repeat (1000000) @(posedge clk);
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
    int cnt, steps;
    sync = SYNC_IDLE; bus = 0; f_bus = 0; nbr_xpwm = 0; fog_tt = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 12; i++) begin
      v = 8'($urandom);
      @(negedge clk); sync.load_x = 1; sel = 1; bus = v;
      @(negedge clk); sync.load_x = 0; sel = 0;
      chk("load", x_out == v);
      bus = 8'($urandom); sync.enc_strobe = 1; @(negedge clk); sync.enc_strobe = 0;
      chk("xpwm", xpwm == !(v > bus));
      // integration run
      fog_tt = (i == 0) ? 4'b1111 : 4'($urandom);
      steps = (i == 0) ? 260 : 40;
      sync.cnt_clear = 1; @(negedge clk); sync.cnt_clear = 0;
      cnt = 0;
      for (int s = 0; s < steps; s++) begin
        for (int k = 0; k < 16; k++) ft[k*32 +: 32] = $urandom;
        nbr_xpwm = 9'($urandom);
        for (int r = 0; r < 256; r++) begin
          sync.eval_en = 1; bus = 8'(r); f_bus = {ft[256 + r], ft[r]};
          @(negedge clk);
        end
        sync.eval_en = 0;
        g_via = 1'($urandom);
        sync.fog_strobe = 1; @(negedge clk); sync.fog_strobe = 0;
        if (fog_tt[{ft[nbr_xpwm], g_via}] && cnt < 255) cnt++;
      end
      chk("state kept until transfer", x_out == v);
      sync.transfer = 1; @(negedge clk); sync.transfer = 0;
      chk("transfer", x_out == 8'(cnt));
      if (i == 0) chk("saturated", x_out == 8'd255);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
