// Testbench for fog_unit: every truth table against every (f, g) pair, with
// the expected value written out as the Boolean function the table names.
module tb_fog_unit;
  logic f, g, y;
  logic [3:0] tt;
  int checks = 0, failures = 0;

  fog_unit dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    for (int t = 0; t < 16; t++) begin
      for (int a = 0; a < 4; a++) begin
        tt = 4'(t); f = a[1]; g = a[0];
        #1;
        // minterm form: bit0 = !f&!g, bit1 = !f&g, bit2 = f&!g, bit3 = f&g
        exp = (tt[0] & !f & !g) | (tt[1] & !f & g) | (tt[2] & f & !g) | (tt[3] & f & g);
        checks++; if (y !== exp) begin failures++; $display("FAIL tt=%b f=%b g=%b", tt, f, g); end
      end
    end
    // named functions
    tt = 4'b1000; f = 1; g = 1; #1; checks++; if (y !== 1'b1) failures++;   // AND
    tt = 4'b0110; f = 1; g = 1; #1; checks++; if (y !== 1'b0) failures++;   // XOR
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
