// cmp64_partial_dynamic - 64-bit partially dynamic comparator.
//
// The full dynamic tree with the 64 dynamic XE cells replaced by static
// ones: the XE cells, which dominate the power of the full dynamic design,
// no longer switch with a clock, and no XE clock is needed (a much smaller
// clock tree). The Level-1 blocks still precharge with clk_b and the
// Level-2 blocks with clk_c. Outputs: ag (a > b) and eq (a == b), valid
// while both clocks are low; ag is 0 while clk_c is high.
//
// The substitution follows the source design; tier 3 being dynamic like in
// the full design is this implementation's reading of the transistor counts.
module cmp64_partial_dynamic (
  input  logic [63:0] a,
  input  logic [63:0] b,
  input  logic        clk_b,
  input  logic        clk_c,
  output logic        ag,
  output logic        eq
);
  cmp64_dynamic #(.XE_DYNAMIC(1'b0)) u_tree (
    .a(a), .b(b), .clk_a(1'b0), .clk_b(clk_b), .clk_c(clk_c), .ag(ag), .eq(eq)
  );
endmodule
