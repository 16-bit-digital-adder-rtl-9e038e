// tb_cpl_adder_cell - exhaustive check of the CPL adder cell: sum rail,
// carry for carry-in 0 and carry for carry-in 1, each with its complement,
// against the arithmetic sum of the two bits.
module tb_cpl_adder_cell;
  timeunit 1ns; timeprecision 1ps;
  logic a, b, s0, s0_n, c0, c0_n, c1, c1_n;
  int checks = 0, failures = 0;

  cpl_adder_cell dut (.a(a), .b(b), .s0(s0), .s0_n(s0_n), .c0(c0), .c0_n(c0_n), .c1(c1), .c1_n(c1_n));

  initial begin : watchdog
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] t0, t1;
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      t0 = 2'(a) + 2'(b);         // carry in 0
      t1 = 2'(a) + 2'(b) + 2'd1;  // carry in 1
      checks++;
      if (s0 !== t0[0] || s0_n !== ~t0[0] || c0 !== t0[1] || c0_n !== ~t0[1] ||
          c1 !== t1[1] || c1_n !== ~t1[1] || t1[0] !== ~s0) begin
        failures++;
        $display("FAIL a=%0b b=%0b s0=%0b c0=%0b c1=%0b", a, b, s0, c0, c1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
