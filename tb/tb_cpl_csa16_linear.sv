// tb_cpl_csa16_linear - checks the 16-bit linear CPL carry-select adder
// against a + b + cin: the full-propagate cases (all ones plus carry, which
// ripple through every block), carry-generate at each block boundary, and
// random operands with both carry-in values.
module tb_cpl_csa16_linear;
  timeunit 1ns; timeprecision 1ps;
  logic [15:0] a, b, sum;
  logic cin, cout;
  int checks = 0, failures = 0;

  cpl_csa16_linear dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [16:0] t;
    #1;
    t = 17'(a) + 17'(b) + 17'(cin);
    checks++;
    if ({cout, sum} !== t) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%0b got %0b_%h exp %h", a, b, cin, cout, sum, t);
    end
  endtask

  initial begin
    a = 16'hffff; b = 16'h0000; cin = 1'b1; check();
    a = 16'hffff; b = 16'h0000; cin = 1'b0; check();
    a = 16'hffff; b = 16'hffff; cin = 1'b1; check();
    a = 16'h0000; b = 16'h0000; cin = 1'b0; check();
    for (int k = 0; k < 16; k++) begin
      a = 16'hffff >> k; b = 16'h0001 << (16 - k); cin = 1'b1; check();
      a = 16'(1) << k;   b = 16'hffff;             cin = 1'b0; check();
    end
    for (int n = 0; n < 20000; n++) begin
      a = 16'($urandom); b = 16'($urandom); cin = 1'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
