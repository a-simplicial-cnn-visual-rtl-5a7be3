// Testbench for vertex_latch: a random 512-bit table is broadcast two bits at
// a time over an inner-ramp sweep; after the sweep the latch must hold T[W].
// Also checks that the latch changes only in the matching cycle.
module tb_vertex_latch;
  import scnn_pkg::*;
  logic clk = 0, rst_n = 0, eval_en = 0, val;
  logic [7:0] inner_ramp;
  logic [8:0] w;
  logic [1:0] mem_bits;
  logic [511:0] t;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  vertex_latch dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic prev_val;
    inner_ramp = 0; mem_bits = 0; w = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 300; it++) begin
      for (int k = 0; k < 16; k++) t[k*32 +: 32] = $urandom;
      w = 9'($urandom);
      for (int r = 0; r < 256; r++) begin
        @(negedge clk);
        prev_val = val;
        eval_en = 1; inner_ramp = 8'(r); mem_bits = {t[256 + r], t[r]};
        @(negedge clk);
        eval_en = 0;
        if (8'(r) != w[7:0]) begin
          checks++; if (val !== prev_val) failures++;
        end
      end
      checks++;
      if (val !== t[w]) begin failures++; $display("FAIL w=%0d val=%0b exp=%0b", w, val, t[w]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
