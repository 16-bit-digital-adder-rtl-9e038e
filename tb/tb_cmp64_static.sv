// tb_cmp64_static - checks the 64-bit static radix-4 comparator against the
// unsigned comparison of the operands.
// Vectors: equal operands; operands whose first difference is at each of
// the 64 bit positions in turn, with either operand the larger one (this
// includes the worst path, only the LSB pair differing, and the best path,
// the MSB pair differing); and fully random operand pairs. The checker
// counts how often each outcome (A greater, B greater, equal) occurred and
// fails if any never did.
module tb_cmp64_static;
  timeunit 1ns; timeprecision 1ps;
  logic [63:0] a, b;
  logic ag, eq;
  int checks = 0, failures = 0;
  int n_ag = 0, n_bg = 0, n_eq = 0;

  cmp64_static dut (.a(a), .b(b), .ag(ag), .eq(eq));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic exp_ag, exp_eq;
    #1;
    exp_ag = (a > b);
    exp_eq = (a == b);
    checks++;
    if (ag !== exp_ag || eq !== exp_eq) begin
      failures++;
      $display("FAIL a=%h b=%h ag=%0b eq=%0b", a, b, ag, eq);
    end
    if (exp_eq) n_eq++;
    else if (exp_ag) n_ag++;
    else n_bg++;
  endtask

  // Operands that agree above bit k, differ at bit k, random below.
  task automatic first_diff_at(int k);
    a = {$urandom, $urandom};
    b = a;
    b[k] = ~a[k];
    for (int i = 0; i < k; i++) b[i] = 1'($urandom);
  endtask

  initial begin
    for (int n = 0; n < 50; n++) begin
      a = {$urandom, $urandom};
      b = a;
      check();
    end
    for (int rep = 0; rep < 20; rep++) begin
      for (int k = 0; k < 64; k++) begin
        first_diff_at(k);
        check();
        {a, b} = {b, a};
        check();
      end
    end
    for (int n = 0; n < 2000; n++) begin
      a = {$urandom, $urandom};
      b = {$urandom, $urandom};
      check();
    end
    if (n_ag == 0 || n_bg == 0 || n_eq == 0) begin
      failures++;
      $display("FAIL outcome never seen: ag=%0d bg=%0d eq=%0d", n_ag, n_bg, n_eq);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
