// tb_workloads - runs the stimulus patterns used to characterise the design,
// at full size, and checks every result.
//
//  1. Adder pulse trains: all bits of A are a square wave of 10 ns period,
//     all bits of B one of 20 ns, carry in one of 40 ns (the 100 MHz
//     activity pattern of the 16-bit adder comparison). Both adders are
//     checked every 2.5 ns over two full 40 ns patterns; the pattern
//     includes 0xFFFF + 0x0000 + 1, the carry running through all blocks.
//  2. XE pulse test: A is a 1 GHz and B a 500 MHz square wave; the dynamic
//     XE cell is clocked at 2 GHz with 50 %, 25 % and 10 % duty cycle, the
//     static cell runs unclocked. Both are sampled every 50 ps.
//  3. Comparator worst-delay pattern: A and B agree in every bit except the
//     LSB pair, which alternates between 1/0 and 0/1 every cycle, so every
//     decision travels the longest chain path.
//  4. Comparator high-activity pattern: every bit of A toggles every cycle
//     and every bit of B every second cycle, so all 64 XE cells switch.
// Patterns 3 and 4 run on the static comparator at 1 GHz and on both
// dynamic comparators at 5 GHz with 20 % and 25 % duty cycle clocks.
module tb_workloads;
  timeunit 1ps; timeprecision 1ps;

  logic [15:0] add_a, add_b, lin_sum, sqrt_sum;
  logic        add_cin, lin_cout, sqrt_cout;
  logic [63:0] cmp_a, cmp_b;
  logic        clk_a, clk_b, clk_c;
  logic        st_ag, st_eq, fd_ag, fd_eq, pd_ag, pd_eq;
  logic        xa, xb, xclk, xs_x, xs_e, xd_x, xd_e;

  int checks = 0, failures = 0;

  cpl_adder_cmp64_top dut (
    .add_a(add_a), .add_b(add_b), .add_cin(add_cin),
    .lin_sum(lin_sum), .lin_cout(lin_cout), .sqrt_sum(sqrt_sum), .sqrt_cout(sqrt_cout),
    .cmp_a(cmp_a), .cmp_b(cmp_b), .clk_a(clk_a), .clk_b(clk_b), .clk_c(clk_c),
    .st_ag(st_ag), .st_eq(st_eq), .fd_ag(fd_ag), .fd_eq(fd_eq), .pd_ag(pd_ag), .pd_eq(pd_eq)
  );
  xe_static  u_xe_s (.a(xa), .b(xb), .x(xs_x), .e(xs_e));
  xe_dynamic u_xe_d (.a(xa), .b(xb), .clk_pre(xclk), .x(xd_x), .e(xd_e));

  initial begin : watchdog
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // One comparator cycle: precharge pulse of 'pulse' ps, then evaluation.
  task automatic cmp_cycle(int period, int pulse, bit dynamic);
    {clk_a, clk_b, clk_c} = dynamic ? 3'b111 : 3'b000;
    #(pulse);
    {clk_a, clk_b, clk_c} = 3'b000;
    #(period - pulse - 5);
    expect_true("static comparator", st_ag === (cmp_a > cmp_b) && st_eq === (cmp_a == cmp_b));
    if (dynamic) begin
      expect_true("full dynamic comparator", fd_ag === (cmp_a > cmp_b) && fd_eq === (cmp_a == cmp_b));
      expect_true("partially dynamic comparator", pd_ag === (cmp_a > cmp_b) && pd_eq === (cmp_a == cmp_b));
    end
    #5;
  endtask

  task automatic run_cmp_patterns(int period, int pulse, bit dynamic);
    logic [63:0] base;
    int n_ag, n_bg;
    n_ag = 0; n_bg = 0;
    base = 64'h5a5a_3c3c_0f0f_9696;
    for (int n = 0; n < 200; n++) begin            // pattern 3: LSB only
      cmp_a = {base[63:1], n[0]};
      cmp_b = {base[63:1], ~n[0]};
      cmp_cycle(period, pulse, dynamic);
      if (st_ag) n_ag++; else n_bg++;
    end
    expect_true("worst-delay pattern alternates AG and BG", n_ag == 100 && n_bg == 100);
    for (int n = 0; n < 200; n++) begin            // pattern 4: all bits toggle
      cmp_a = {64{n[0]}};
      cmp_b = {64{n[1]}};
      cmp_cycle(period, pulse, dynamic);
    end
  endtask

  initial begin
    {clk_a, clk_b, clk_c} = 3'b000;
    add_a = '0; add_b = '0; add_cin = 1'b0;
    cmp_a = '0; cmp_b = '0;
    xa = 1'b0; xb = 1'b0; xclk = 1'b0;
    #1000;

    // 1. Adder pulse trains (time in ps; 2.5 ns steps).
    for (int t = 0; t < 80_000; t += 2_500) begin
      add_a   = {16{((t / 5_000) % 2) == 1}};
      add_b   = {16{((t / 10_000) % 2) == 1}};
      add_cin = ((t / 20_000) % 2) == 1;
      #2_000;
      expect_true("linear adder", {lin_cout, lin_sum} === 17'(add_a) + 17'(add_b) + 17'(add_cin));
      expect_true("sqrt adder", {sqrt_cout, sqrt_sum} === 17'(add_a) + 17'(add_b) + 17'(add_cin));
      #500;
    end

    // 2. XE pulse test at 2 GHz with three duty cycles (50 ps steps).
    for (int d = 0; d < 3; d++) begin
      int high_ps;
      high_ps = (d == 0) ? 250 : (d == 1) ? 125 : 50;
      for (int t = 0; t < 4_000; t += 50) begin
        xa   = ((t / 500) % 2) == 1;
        xb   = ((t / 1_000) % 2) == 1;
        xclk = (t % 500) < high_ps;
        #25;
        expect_true("static XE", xs_x === (xa ^ xb) && xs_e === (xa ~^ xb));
        expect_true("dynamic XE", xclk ? (xd_x === 1'b0 && xd_e === 1'b0)
                                       : (xd_x === (xa ^ xb) && xd_e === (xa ~^ xb)));
        #25;
      end
    end
    xclk = 1'b0;

    // 3 and 4. Comparator patterns.
    run_cmp_patterns(1000, 0, 1'b0);   // static, 1 GHz
    run_cmp_patterns(200, 40, 1'b1);   // dynamic, 5 GHz, 20 % duty
    run_cmp_patterns(200, 50, 1'b1);   // dynamic, 5 GHz, 25 % duty

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
