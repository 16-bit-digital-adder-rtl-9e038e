// tb_cmp_l1_static - exhaustive check of the Level-1 static 4-bit comparator
// for all 256 operand pairs, with B bits passed (mag = A greater) and with
// A bits passed (mag = B greater). Expected values come from comparing the
// operands as unsigned numbers.
module tb_cmp_l1_static;
  timeunit 1ns; timeprecision 1ps;
  logic [3:0] a, b;
  logic ag, eq_b, bg, eq_a;
  int checks = 0, failures = 0;

  cmp_l1_static dut (.a(a), .b(b), .mag(ag), .eq(eq_b));
  cmp_l1_static #(.PASS_B(1'b0)) dut_bg (.a(a), .b(b), .mag(bg), .eq(eq_a));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      {a, b} = 8'(i);
      #1;
      checks++;
      if (ag !== (a > b) || eq_b !== (a == b)) begin
        failures++;
        $display("FAIL AG a=%h b=%h ag=%0b eq=%0b", a, b, ag, eq_b);
      end
      checks++;
      if (bg !== (a < b) || eq_a !== (a == b)) begin
        failures++;
        $display("FAIL BG a=%h b=%h bg=%0b eq=%0b", a, b, bg, eq_a);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
