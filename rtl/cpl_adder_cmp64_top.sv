// cpl_adder_cmp64_top - the two arithmetic designs side by side.
//
// Adders: a 16-bit linear carry-select adder and a 16-bit square-root
// carry-select adder, both built from CPL blocks with internal carry
// selection, share the operand inputs and have separate results.
// Comparators: the static, full dynamic and partially dynamic 64-bit
// radix-4 tree comparators share the operand inputs and the precharge
// clocks and have separate (AG, EQ) outputs.
// The two groups are independent; the clocks only reach the dynamic
// comparators. Timing: combinational; dynamic results are valid while all
// clocks are low.
module cpl_adder_cmp64_top (
  input  logic [15:0] add_a,
  input  logic [15:0] add_b,
  input  logic        add_cin,
  output logic [15:0] lin_sum,
  output logic        lin_cout,
  output logic [15:0] sqrt_sum,
  output logic        sqrt_cout,
  input  logic [63:0] cmp_a,
  input  logic [63:0] cmp_b,
  input  logic        clk_a,
  input  logic        clk_b,
  input  logic        clk_c,
  output logic        st_ag,
  output logic        st_eq,
  output logic        fd_ag,
  output logic        fd_eq,
  output logic        pd_ag,
  output logic        pd_eq
);
  cpl_csa16_linear u_add_lin (.a(add_a), .b(add_b), .cin(add_cin), .sum(lin_sum), .cout(lin_cout));
  cpl_csa16_sqrt   u_add_sqrt (.a(add_a), .b(add_b), .cin(add_cin), .sum(sqrt_sum), .cout(sqrt_cout));

  cmp64_static u_cmp_st (.a(cmp_a), .b(cmp_b), .ag(st_ag), .eq(st_eq));
  cmp64_dynamic u_cmp_fd (
    .a(cmp_a), .b(cmp_b), .clk_a(clk_a), .clk_b(clk_b), .clk_c(clk_c), .ag(fd_ag), .eq(fd_eq)
  );
  cmp64_partial_dynamic u_cmp_pd (
    .a(cmp_a), .b(cmp_b), .clk_b(clk_b), .clk_c(clk_c), .ag(pd_ag), .eq(pd_eq)
  );
endmodule
