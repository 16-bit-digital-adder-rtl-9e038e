// tb_cpl_adder_cmp64_top - end-to-end test of the whole design at its
// default sizes (16-bit adders, 64-bit comparators).
//
// Every 200 ps cycle (5 GHz) the bench applies new adder operands and a new
// comparator operand pair. The precharge clocks CLK_a, CLK_b and CLK_c pulse
// high for the first 40 ps (20 % duty cycle); some cycles use a staggered
// pattern in which only one of them is high at the sampling point. Checks:
//   * both adders give a + b + cin;
//   * the static comparator gives (a > b, a == b) at all times;
//   * the full and partially dynamic comparators give the same result at the
//     end of the evaluation phase, and their precharge values during the
//     pulse (ag = 0; eq = 1 while an XE or Level-1 clock is high).
// It counts how often each mechanism occurs: carry in 0 and 1, carry out,
// a carry entering each carry-select block of both adders, the full
// 16-bit carry propagation, each comparison outcome, a decision in each of
// the 16 Level-1 groups, the worst (LSB-only) and best (MSB) comparator
// paths, each single-clock precharge state and the all-clock precharge. A
// mechanism that never occurs counts as a failure.
module tb_cpl_adder_cmp64_top;
  timeunit 1ps; timeprecision 1ps;
  localparam int PERIOD = 200;
  localparam int PULSE  = 40;
  localparam int CYCLES = 4000;

  logic [15:0] add_a, add_b, lin_sum, sqrt_sum;
  logic        add_cin, lin_cout, sqrt_cout;
  logic [63:0] cmp_a, cmp_b;
  logic        clk_a, clk_b, clk_c;
  logic        st_ag, st_eq, fd_ag, fd_eq, pd_ag, pd_eq;

  int checks = 0, failures = 0;

  typedef enum int {
    M_CIN0, M_CIN1, M_COUT, M_FULL_PROP,
    M_LIN_B1, M_LIN_B2, M_LIN_B3,
    M_SQ_B1, M_SQ_B2, M_SQ_B3, M_SQ_B4,
    M_AG, M_BG, M_EQ, M_WORST, M_BEST,
    M_PRE_A, M_PRE_B, M_PRE_C, M_PRE_ALL,
    M_NUM
  } mech_e;
  int mech [M_NUM];
  int group_decided [16];

  cpl_adder_cmp64_top dut (
    .add_a(add_a), .add_b(add_b), .add_cin(add_cin),
    .lin_sum(lin_sum), .lin_cout(lin_cout), .sqrt_sum(sqrt_sum), .sqrt_cout(sqrt_cout),
    .cmp_a(cmp_a), .cmp_b(cmp_b), .clk_a(clk_a), .clk_b(clk_b), .clk_c(clk_c),
    .st_ag(st_ag), .st_eq(st_eq), .fd_ag(fd_ag), .fd_eq(fd_eq), .pd_ag(pd_ag), .pd_eq(pd_eq)
  );

  initial begin : watchdog
    #(PERIOD * (CYCLES + 100));
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic carry_into(int bitpos);
    logic [16:0] t;
    logic [15:0] mask;
    mask = (16'(1) << bitpos) - 16'd1;
    t = 17'(add_a & mask) + 17'(add_b & mask) + 17'(add_cin);
    return t[bitpos];
  endfunction

  task automatic new_adder_operands(int n);
    case (n % 8)
      0: begin add_a = 16'hffff; add_b = 16'h0000; add_cin = 1'b1; end
      1: begin add_a = 16'($urandom); add_b = ~add_a; add_cin = 1'($urandom); end
      default: begin add_a = 16'($urandom); add_b = 16'($urandom); add_cin = 1'($urandom); end
    endcase
    if (add_cin) mech[M_CIN1]++; else mech[M_CIN0]++;
    if (carry_into(4))  mech[M_LIN_B1]++;
    if (carry_into(8))  mech[M_LIN_B2]++;
    if (carry_into(12)) mech[M_LIN_B3]++;
    if (carry_into(2))  mech[M_SQ_B1]++;
    if (carry_into(4))  mech[M_SQ_B2]++;
    if (carry_into(7))  mech[M_SQ_B3]++;
    if (carry_into(11)) mech[M_SQ_B4]++;
    if ((add_a ^ add_b) == 16'hffff && add_cin) mech[M_FULL_PROP]++;
  endtask

  task automatic new_cmp_operands(int n);
    int k;
    cmp_a = {$urandom, $urandom};
    cmp_b = cmp_a;
    k = -1;
    case (n % 5)
      0: ;                                          // equal
      1: k = 0;                                     // worst path: LSB only
      2: k = 63;                                    // best path: MSB
      default: k = $urandom_range(0, 63);
    endcase
    if (k >= 0) begin
      cmp_b[k] = ~cmp_a[k];
      for (int i = 0; i < k; i++) cmp_b[i] = 1'($urandom);
      if (k == 0) mech[M_WORST]++;
      if (k == 63) mech[M_BEST]++;
      group_decided[k / 4]++;
      mech[cmp_a[k] ? M_AG : M_BG]++;
    end else begin
      mech[M_EQ]++;
    end
  endtask

  task automatic expect_bit(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %0b exp %0b (a=%h b=%h clocks=%0b%0b%0b)",
               what, got, exp, cmp_a, cmp_b, clk_a, clk_b, clk_c);
    end
  endtask

  task automatic check_adders();
    logic [16:0] t;
    t = 17'(add_a) + 17'(add_b) + 17'(add_cin);
    checks++;
    if ({lin_cout, lin_sum} !== t || {sqrt_cout, sqrt_sum} !== t) begin
      failures++;
      $display("FAIL adders a=%h b=%h cin=%0b lin=%0b_%h sqrt=%0b_%h", add_a, add_b, add_cin,
               lin_cout, lin_sum, sqrt_cout, sqrt_sum);
    end
    if (t[16]) mech[M_COUT]++;
  endtask

  initial begin
    logic exp_ag, exp_eq;
    foreach (mech[i]) mech[i] = 0;
    foreach (group_decided[i]) group_decided[i] = 0;
    {clk_a, clk_b, clk_c} = 3'b000;
    add_a = '0; add_b = '0; add_cin = 1'b0; cmp_a = '0; cmp_b = '0;
    #PERIOD;
    for (int n = 0; n < CYCLES; n++) begin
      new_adder_operands(n);
      new_cmp_operands(n);
      exp_ag = (cmp_a > cmp_b);
      exp_eq = (cmp_a == cmp_b);
      // Precharge pulse: all clocks, or one clock alone in staggered cycles.
      case (n % 4)
        0, 1: {clk_a, clk_b, clk_c} = 3'b111;
        2:    {clk_a, clk_b, clk_c} = 3'(1 << ((n / 4) % 3));
        default: {clk_a, clk_b, clk_c} = 3'b111;
      endcase
      #(PULSE / 2);
      if ({clk_a, clk_b, clk_c} == 3'b111) mech[M_PRE_ALL]++;
      if ({clk_a, clk_b, clk_c} == 3'b100) mech[M_PRE_A]++;
      if ({clk_a, clk_b, clk_c} == 3'b010) mech[M_PRE_B]++;
      if ({clk_a, clk_b, clk_c} == 3'b001) mech[M_PRE_C]++;
      expect_bit("fd_ag precharge", fd_ag, (clk_a | clk_b | clk_c) ? 1'b0 : exp_ag);
      expect_bit("fd_eq precharge", fd_eq, (clk_a | clk_b) ? 1'b1 : exp_eq);
      expect_bit("pd_ag precharge", pd_ag, (clk_b | clk_c) ? 1'b0 : exp_ag);
      expect_bit("pd_eq precharge", pd_eq, clk_b ? 1'b1 : exp_eq);
      expect_bit("st_ag", st_ag, exp_ag);
      expect_bit("st_eq", st_eq, exp_eq);
      check_adders();
      #(PULSE / 2);
      {clk_a, clk_b, clk_c} = 3'b000;
      #(PERIOD - PULSE - 10);
      expect_bit("fd_ag", fd_ag, exp_ag);
      expect_bit("fd_eq", fd_eq, exp_eq);
      expect_bit("pd_ag", pd_ag, exp_ag);
      expect_bit("pd_eq", pd_eq, exp_eq);
      #10;
    end
    foreach (mech[i]) begin
      checks++;
      if (mech[i] == 0) begin
        failures++;
        $display("FAIL mechanism %s never occurred", mech_e'(i));
      end
    end
    foreach (group_decided[i]) begin
      checks++;
      if (group_decided[i] == 0) begin
        failures++;
        $display("FAIL no comparison decided in Level-1 group %0d", i);
      end
    end
    $display("mechanism counts:");
    foreach (mech[i]) $display("  %-12s %0d", mech_e'(i), mech[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
