// cmp_l2_static - Level-2 static comparator sub-block (tiers 2 and 3).
//
// Combines the (magnitude, EQ) outputs of four lower sub-blocks, index 3
// being the most significant group. It works like the Level-1 block one
// level up: NOT eq_in[i] plays the role of a bit-unequal rail, eq_in[i] that
// of a bit-equal rail, and mag_in[i] is the value chain 1 passes. Chain 1
// passes mag_in of the most significant unequal group to node N1 (1 when all
// groups are equal) and the output is NOT N1, so the magnitude polarity flips
// from tier to tier: AG inputs give a BG output and BG inputs an AG output.
// eq is 1 only when every group is equal.
// Timing: combinational.
//
// The chain structure and polarity follow the source design.
module cmp_l2_static (
  input  logic [3:0] mag_in,  // AG (or BG) of four lower blocks
  input  logic [3:0] eq_in,   // EQ of four lower blocks
  output logic       mag,     // BG (or AG): opposite polarity to mag_in
  output logic       eq
);
  cmp_l2_chains u_chains (.mag_in(mag_in), .eq_in(eq_in), .mag(mag), .eq(eq));
endmodule
