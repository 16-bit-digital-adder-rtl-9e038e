// tb_xe_static - exhaustive check of the static XE cell: for all four input
// pairs x must be 1 exactly when the bits differ and e exactly when they agree.
module tb_xe_static;
  timeunit 1ns; timeprecision 1ps;
  logic a, b, x, e;
  int checks = 0, failures = 0;

  xe_static dut (.a(a), .b(b), .x(x), .e(e));

  initial begin : watchdog
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if (x !== (a != b) || e !== (a == b)) begin
        failures++;
        $display("FAIL a=%0b b=%0b x=%0b e=%0b", a, b, x, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
