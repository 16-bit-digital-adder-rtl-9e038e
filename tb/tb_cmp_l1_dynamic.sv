// tb_cmp_l1_dynamic - exhaustive check of the Level-1 dynamic comparator,
// with dynamic XE cells (full dynamic) and with static XE cells (partially
// dynamic), for all operand pairs and all four clock states. In the
// evaluation state (both clocks low) the outputs must be the unsigned
// comparison; with the block clock high the block must read mag = 0,
// eq = 1; with only the XE clock high the dynamic-XE variant must read the
// same neutral value while the static-XE variant still evaluates.
module tb_cmp_l1_dynamic;
  timeunit 1ns; timeprecision 1ps;
  logic [3:0] a, b;
  logic clk_xe, clk_pre;
  logic mag_d, eq_d, mag_s, eq_s;
  int checks = 0, failures = 0;

  cmp_l1_dynamic dut (.a(a), .b(b), .clk_xe(clk_xe), .clk_pre(clk_pre), .mag(mag_d), .eq(eq_d));
  cmp_l1_dynamic #(.XE_DYNAMIC(1'b0)) dut_pd (
    .a(a), .b(b), .clk_xe(clk_xe), .clk_pre(clk_pre), .mag(mag_s), .eq(eq_s)
  );

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_mag_d, exp_eq_d, exp_mag_s, exp_eq_s;
    for (int i = 0; i < 1024; i++) begin
      {clk_xe, clk_pre, a, b} = 10'(i);
      #1;
      if (clk_pre || clk_xe) begin
        exp_mag_d = 1'b0; exp_eq_d = 1'b1;
      end else begin
        exp_mag_d = (a > b); exp_eq_d = (a == b);
      end
      if (clk_pre) begin
        exp_mag_s = 1'b0; exp_eq_s = 1'b1;
      end else begin
        exp_mag_s = (a > b); exp_eq_s = (a == b);
      end
      checks++;
      if (mag_d !== exp_mag_d || eq_d !== exp_eq_d) begin
        failures++;
        $display("FAIL full clk=%0b%0b a=%h b=%h mag=%0b eq=%0b", clk_xe, clk_pre, a, b, mag_d, eq_d);
      end
      checks++;
      if (mag_s !== exp_mag_s || eq_s !== exp_eq_s) begin
        failures++;
        $display("FAIL part clk=%0b%0b a=%h b=%h mag=%0b eq=%0b", clk_xe, clk_pre, a, b, mag_s, eq_s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
