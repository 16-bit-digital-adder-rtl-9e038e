// cmp64_static - 64-bit static magnitude comparator, radix-4 tree.
//
// The comparison runs from the most significant bit down: the first unequal
// bit pair decides, everything below it is ignored. The tree has three tiers:
//   tier 1: 16 Level-1 blocks, each comparing 4 bit pairs (AG, EQ);
//   tier 2:  4 Level-2 blocks, each combining 4 Level-1 results (BG, EQ);
//   tier 3:  1 Level-2 block combining the 4 tier-2 results (AG, EQ).
// Each Level-2 tier flips the magnitude polarity, so with three tiers and
// B bits passed in tier 1 the final magnitude output is "A greater".
// Outputs are encoded in two bits: ag, eq; "B greater" is NOT ag AND NOT eq.
// Worst path: only the LSB pair differs (12 chain positions); best path:
// the MSB pair differs (3 positions).
// Timing: combinational.
//
// The tree, the sub-blocks and the two-output encoding follow the source
// design. The four buffers on the tier-2 outputs of the transistor design
// are electrical only and are not represented.
module cmp64_static (
  input  logic [63:0] a,
  input  logic [63:0] b,
  output logic        ag,  // a > b
  output logic        eq   // a == b
);
  logic [15:0] l1_ag, l1_eq;
  logic [3:0]  l2_bg, l2_eq;

  for (genvar g = 0; g < 16; g++) begin : g_t1
    cmp_l1_static #(.PASS_B(1'b1)) u_l1 (
      .a(a[4*g +: 4]), .b(b[4*g +: 4]), .mag(l1_ag[g]), .eq(l1_eq[g])
    );
  end

  for (genvar g = 0; g < 4; g++) begin : g_t2
    cmp_l2_static u_l2 (
      .mag_in(l1_ag[4*g +: 4]), .eq_in(l1_eq[4*g +: 4]), .mag(l2_bg[g]), .eq(l2_eq[g])
    );
  end

  cmp_l2_static u_t3 (.mag_in(l2_bg), .eq_in(l2_eq), .mag(ag), .eq(eq));
endmodule
