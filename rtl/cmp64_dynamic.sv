// cmp64_dynamic - 64-bit dynamic magnitude comparator, radix-4 tree.
//
// Same three-tier tree and polarity scheme as cmp64_static, built from
// dynamic sub-blocks that each have a short precharge phase:
//   clk_a (CLK_a): pre-discharges the 64 dynamic XE cells;
//   clk_b (CLK_b): precharges the 16 Level-1 blocks of tier 1;
//   clk_c (CLK_c): precharges node N1 of the Level-2 blocks of tiers 2, 3.
// All clocks are active-high precharge pulses, meant to be short (20-25 %
// of a 5 GHz period). While every clock is low the outputs equal those of
// the static comparator. While clk_c is high ag is 0; while only the lower
// tiers precharge the tree reads as "equal" (ag = 0, eq = 1).
//
// XE_DYNAMIC = 1 (default) is the full dynamic design. XE_DYNAMIC = 0 puts
// static XE cells in tier 1 and ignores clk_a: the partially dynamic design
// (see cmp64_partial_dynamic).
//
// The tree and the precharge devices follow the source design. Which clock
// drives which tier is this implementation's assumption. The transistor
// design relies on balanced path delays to run several comparisons in
// flight at once (self-pipelining); a zero-delay model cannot show that, so
// here a result is valid in the evaluation phase of the cycle that applies
// its inputs.
module cmp64_dynamic #(
  parameter bit XE_DYNAMIC = 1'b1
) (
  input  logic [63:0] a,
  input  logic [63:0] b,
  input  logic        clk_a,
  input  logic        clk_b,
  input  logic        clk_c,
  output logic        ag,
  output logic        eq
);
  logic [15:0] l1_ag, l1_eq;
  logic [3:0]  l2_bg, l2_eq;

  for (genvar g = 0; g < 16; g++) begin : g_t1
    cmp_l1_dynamic #(.PASS_B(1'b1), .XE_DYNAMIC(XE_DYNAMIC)) u_l1 (
      .a(a[4*g +: 4]), .b(b[4*g +: 4]), .clk_xe(clk_a), .clk_pre(clk_b),
      .mag(l1_ag[g]), .eq(l1_eq[g])
    );
  end

  for (genvar g = 0; g < 4; g++) begin : g_t2
    cmp_l2_dynamic u_l2 (
      .mag_in(l1_ag[4*g +: 4]), .eq_in(l1_eq[4*g +: 4]), .clk_pre(clk_c),
      .mag(l2_bg[g]), .eq(l2_eq[g])
    );
  end

  cmp_l2_dynamic u_t3 (.mag_in(l2_bg), .eq_in(l2_eq), .clk_pre(clk_c), .mag(ag), .eq(eq));
endmodule
