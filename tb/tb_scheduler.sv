// Testbench for scheduler: counts the strobes and the cycles of an A/D
// conversion cycle and of a two-iteration program cycle, and checks the
// ramp values seen with each strobe and the cycle counts stated in the
// scheduler's header (2 + 259 * 256 cycles per program cycle).
module tb_scheduler;
  import scnn_pkg::*;
  logic clk = 0, rst_n = 0, start_prog = 0, start_adc = 0;
  cfg_t cfg;
  sync_t sync;
  logic drive_dramp, mem_rd_en, busy, done;
  logic [7:0] dramp, mem_rd_addr;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  scheduler #(.DW(8)) dut (.*);

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0d, expected %0d", what, got, exp); end
  endtask

  initial begin
    int cyc, n_rst, n_int, n_smp, n_ramp, n_last, ramp_err;
    int n_clr, n_enc, n_rd, n_fog, n_xfer, enc_err, rd_err, next_rd;
    cfg = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // ---- A/D conversion cycle
    cfg.int_time = 8'd37;
    @(negedge clk); start_adc = 1; @(negedge clk); start_adc = 0;
    cyc = 1; n_rst = 0; n_int = 0; n_smp = 0; n_ramp = 0; n_last = 0; ramp_err = 0;
    while (!done) begin
      n_rst += int'(sync.pd_reset); n_int += int'(sync.pd_integrate); n_smp += int'(sync.pd_sample);
      if (sync.adc_ramp) begin
        if (!drive_dramp || dramp != 8'(n_ramp)) ramp_err++;
        if (sync.adc_last != (n_ramp == 255)) ramp_err++;
        n_ramp++; n_last += int'(sync.adc_last);
      end
      @(negedge clk); cyc++;
    end
    n_ramp++; n_last += int'(sync.adc_last);  // done cycle is the last ramp value
    check("adc reset", n_rst, 1); check("adc integrate", n_int, 37); check("adc sample", n_smp, 1);
    check("adc ramp", n_ramp, 256); check("adc last", n_last, 1); check("adc ramp errors", ramp_err, 0);
    check("adc cycles", cyc, 1 + 37 + 1 + 256);
    @(negedge clk); check("idle after adc", int'(busy), 0);
    // ---- program cycle, two iterations
    cfg.iterations = 8'd2;
    start_prog = 1; @(negedge clk); start_prog = 0;
    cyc = 1; n_clr = 0; n_enc = 0; n_rd = 0; n_fog = 0; n_xfer = 0; enc_err = 0; rd_err = 0; next_rd = 0;
    while (1) begin
      n_clr += int'(sync.cnt_clear);
      if (sync.enc_strobe) begin
        if (!drive_dramp || dramp != 8'(n_enc % 256)) enc_err++;
        n_enc++;
      end
      if (mem_rd_en) begin
        if (mem_rd_addr != 8'(next_rd)) rd_err++;
        next_rd = (next_rd + 1) % 256; n_rd++;
      end
      n_fog += int'(sync.fog_strobe);
      n_xfer += int'(sync.transfer);
      if (done) break;
      @(negedge clk); cyc++;
    end
    check("prog clears", n_clr, 2); check("enc strobes", n_enc, 512); check("memory reads", n_rd, 2 * 65536);
    check("fog strobes", n_fog, 512); check("transfers", n_xfer, 2);
    check("enc ramp errors", enc_err, 0); check("read address errors", rd_err, 0);
    check("program cycles", cyc, 2 * (2 + 259 * 256));
    @(negedge clk); check("idle after prog", int'(busy), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
