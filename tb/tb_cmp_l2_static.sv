// tb_cmp_l2_static - checks the Level-2 static sub-block by feeding it the
// per-nibble results of two 16-bit operands (nibble i greater, nibble i
// equal) and expecting the whole-word result with flipped polarity:
// mag = (a < b) and eq = (a == b). It also feeds B-greater nibble flags and
// expects A greater, as in tier 3. Operands are drawn so that runs of equal
// nibbles above the deciding one are common.
module tb_cmp_l2_static;
  timeunit 1ns; timeprecision 1ps;
  logic [3:0] mag_in, eq_in;
  logic mag, eq;
  int checks = 0, failures = 0;

  cmp_l2_static dut (.mag_in(mag_in), .eq_in(eq_in), .mag(mag), .eq(eq));

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
      for (int pol = 0; pol < 2; pol++) begin
        for (int g = 0; g < 4; g++) begin
          eq_in[g]  = (a[4*g +: 4] == b[4*g +: 4]);
          mag_in[g] = pol ? (a[4*g +: 4] < b[4*g +: 4]) : (a[4*g +: 4] > b[4*g +: 4]);
        end
        #1;
        checks++;
        if (mag !== (pol ? (a > b) : (a < b)) || eq !== (a == b)) begin
          failures++;
          $display("FAIL pol=%0d a=%h b=%h mag=%0b eq=%0b", pol, a, b, mag, eq);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
