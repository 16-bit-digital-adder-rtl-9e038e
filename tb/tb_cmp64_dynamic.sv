// tb_cmp64_dynamic - checks the full dynamic 64-bit comparator.
//
// Part 1 runs the comparator at one comparison per clock: a 5 GHz clock
// (200 ps period) with a 20 % duty cycle (40 ps precharge pulse) drives
// CLK_a, CLK_b and CLK_c together. A new operand pair is applied at each
// rising edge. During the precharge pulse the outputs must read ag = 0,
// eq = 1; just before the next edge they must give the unsigned comparison
// of that cycle's operands, so that the number of results equals the
// number of clock cycles.
// Part 2 sets every combination of the three clocks by hand and checks the
// tier-by-tier precharge values: ag is 0 whenever any clock is high, eq is
// forced to 1 while the XE or Level-1 clock is high and otherwise follows
// the data.
module tb_cmp64_dynamic;
  timeunit 1ps; timeprecision 1ps;
  localparam int PERIOD = 200;
  localparam int PULSE  = 40;
  localparam int CYCLES = 3000;

  logic [63:0] a, b;
  logic clk_a, clk_b, clk_c, ag, eq;
  int checks = 0, failures = 0;
  int results = 0;

  cmp64_dynamic dut (.a(a), .b(b), .clk_a(clk_a), .clk_b(clk_b), .clk_c(clk_c), .ag(ag), .eq(eq));

  initial begin : watchdog
    #(PERIOD * (CYCLES + 1000));
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic new_operands(int n);
    int k;
    a = {$urandom, $urandom};
    b = a;
    case (n % 4)
      0: ;                                             // equal
      1: b = {$urandom, $urandom};                     // random
      default: begin                                   // first difference at k
        k = $urandom_range(0, 63);
        b[k] = ~a[k];
        for (int i = 0; i < k; i++) b[i] = 1'($urandom);
      end
    endcase
  endtask

  initial begin
    {clk_a, clk_b, clk_c} = 3'b000;
    a = '0;
    b = '0;
    #PERIOD;
    // Part 1: free-running reduced-duty-cycle clock, one comparison per cycle.
    for (int n = 0; n < CYCLES; n++) begin
      {clk_a, clk_b, clk_c} = 3'b111;
      new_operands(n);
      #(PULSE / 2);
      checks++;
      if (ag !== 1'b0 || eq !== 1'b1) begin
        failures++;
        $display("FAIL precharge cycle %0d ag=%0b eq=%0b", n, ag, eq);
      end
      #(PULSE / 2);
      {clk_a, clk_b, clk_c} = 3'b000;
      #(PERIOD - PULSE - 10);
      checks++;
      if (ag !== (a > b) || eq !== (a == b)) begin
        failures++;
        $display("FAIL evaluate cycle %0d a=%h b=%h ag=%0b eq=%0b", n, a, b, ag, eq);
      end else begin
        results++;
      end
      #10;
    end
    checks++;
    if (results != CYCLES) begin
      failures++;
      $display("FAIL %0d results in %0d cycles", results, CYCLES);
    end
    // Part 2: every clock state.
    for (int n = 0; n < 400; n++) begin
      new_operands(n);
      for (int c = 0; c < 8; c++) begin
        {clk_a, clk_b, clk_c} = 3'(c);
        #10;
        checks++;
        if (ag !== ((c != 0) ? 1'b0 : (a > b)) ||
            eq !== ((clk_a || clk_b) ? 1'b1 : (a == b))) begin
          failures++;
          $display("FAIL clocks=%03b a=%h b=%h ag=%0b eq=%0b", c[2:0], a, b, ag, eq);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
