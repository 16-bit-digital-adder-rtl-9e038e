// tb_xe_dynamic - exhaustive check of the dynamic XE cell: with the clock
// high both rails must be pre-discharged to 0; with it low x and e must be
// the "bits differ" and "bits agree" flags.
module tb_xe_dynamic;
  timeunit 1ns; timeprecision 1ps;
  logic a, b, clk_pre, x, e;
  int checks = 0, failures = 0;

  xe_dynamic dut (.a(a), .b(b), .clk_pre(clk_pre), .x(x), .e(e));

  initial begin : watchdog
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ex, ee;
    for (int i = 0; i < 8; i++) begin
      {clk_pre, a, b} = 3'(i);
      #1;
      ex = clk_pre ? 1'b0 : (a != b);
      ee = clk_pre ? 1'b0 : (a == b);
      checks++;
      if (x !== ex || e !== ee) begin
        failures++;
        $display("FAIL clk=%0b a=%0b b=%0b x=%0b e=%0b", clk_pre, a, b, x, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
