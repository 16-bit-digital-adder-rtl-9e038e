// tb_cmp_l2_dynamic - checks the Level-2 dynamic sub-block with per-nibble
// results of random 16-bit operand pairs. With the clock low it must give
// mag = (a < b), eq = (a == b); with the clock high mag must be precharged
// to 0 while eq still follows the inputs (chain 3 has no precharge device).
module tb_cmp_l2_dynamic;
  timeunit 1ns; timeprecision 1ps;
  logic [3:0] mag_in, eq_in;
  logic clk_pre, mag, eq;
  int checks = 0, failures = 0;

  cmp_l2_dynamic dut (.mag_in(mag_in), .eq_in(eq_in), .clk_pre(clk_pre), .mag(mag), .eq(eq));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] a, b;
    for (int n = 0; n < 4000; n++) begin
      a = 16'($urandom);
      b = a;
      for (int g = 0; g < 4; g++)
        if ($urandom_range(0, 2) == 0) b[4*g +: 4] = 4'($urandom);
      for (int g = 0; g < 4; g++) begin
        eq_in[g]  = (a[4*g +: 4] == b[4*g +: 4]);
        mag_in[g] = (a[4*g +: 4] > b[4*g +: 4]);
      end
      for (int c = 0; c < 2; c++) begin
        clk_pre = c[0];
        #1;
        checks++;
        if (mag !== (clk_pre ? 1'b0 : (a < b)) || eq !== (a == b)) begin
          failures++;
          $display("FAIL clk=%0b a=%h b=%h mag=%0b eq=%0b", clk_pre, a, b, mag, eq);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
