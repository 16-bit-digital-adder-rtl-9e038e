// tb_cpl_cs_block - exhaustive check of the CPL carry-select block at its
// default 4-bit width and at the 2-, 3- and 5-bit widths the square-root
// adder uses: every operand pair and carry in, against a + b + cin.
module tb_cpl_cs_block;
  timeunit 1ns; timeprecision 1ps;
  logic [4:0] a, b;
  logic cin;
  logic [3:0] s4;  logic co4;
  logic [1:0] s2;  logic co2;
  logic [2:0] s3;  logic co3;
  logic [4:0] s5;  logic co5;
  int checks = 0, failures = 0;

  cpl_cs_block dut (.a(a[3:0]), .b(b[3:0]), .cin(cin), .sum(s4), .cout(co4));
  cpl_cs_block #(.WIDTH(2)) dut2 (.a(a[1:0]), .b(b[1:0]), .cin(cin), .sum(s2), .cout(co2));
  cpl_cs_block #(.WIDTH(3)) dut3 (.a(a[2:0]), .b(b[2:0]), .cin(cin), .sum(s3), .cout(co3));
  cpl_cs_block #(.WIDTH(5)) dut5 (.a(a), .b(b), .cin(cin), .sum(s5), .cout(co5));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [5:0] t;
    for (int i = 0; i < 2048; i++) begin
      {cin, a, b} = 11'(i);
      #1;
      t = 6'(a[3:0]) + 6'(b[3:0]) + 6'(cin);
      checks++;
      if ({co4, s4} !== t[4:0]) begin failures++; $display("FAIL w4 a=%h b=%h cin=%0b", a, b, cin); end
      t = 6'(a[1:0]) + 6'(b[1:0]) + 6'(cin);
      checks++;
      if ({co2, s2} !== t[2:0]) begin failures++; $display("FAIL w2 a=%h b=%h cin=%0b", a, b, cin); end
      t = 6'(a[2:0]) + 6'(b[2:0]) + 6'(cin);
      checks++;
      if ({co3, s3} !== t[3:0]) begin failures++; $display("FAIL w3 a=%h b=%h cin=%0b", a, b, cin); end
      t = 6'(a) + 6'(b) + 6'(cin);
      checks++;
      if ({co5, s5} !== t) begin failures++; $display("FAIL w5 a=%h b=%h cin=%0b", a, b, cin); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
