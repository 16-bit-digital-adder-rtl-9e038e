// cmp_l1_static - Level-1 static 4-bit comparator sub-block.
//
// Four XE cells compare the bit pairs in parallel. Three pass-transistor
// chains then resolve the word:
//   * chain 1 walks from the MSB towards the LSB while bits are equal and
//     passes the B bit (or A bit) of the first unequal position to node N1;
//     when all bits are equal N1 is pulled to 1 instead (through P0);
//   * chains 2 and 3 set node N2 to 0 when all bits are equal and to 1 when
//     any bit differs.
// The outputs are the inverted nodes: mag = NOT N1, eq = NOT N2.
//
// With PASS_B = 1 the chain passes B bits and mag is "A greater" (AG);
// with PASS_B = 0 it passes A bits and mag is "B greater" (BG). When the
// words are equal mag is 0 and eq is 1.
// Timing: combinational.
//
// The chain structure and the output polarity follow the source design;
// the Boolean form of the chains is this implementation's rendering.
module cmp_l1_static #(
  parameter bit PASS_B = 1'b1
) (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic       mag,  // AG if PASS_B, else BG
  output logic       eq    // all four bit pairs equal
);
  logic [3:0] x, e;

  for (genvar i = 0; i < 4; i++) begin : g_xe
    xe_static u_xe (.a(a[i]), .b(b[i]), .x(x[i]), .e(e[i]));
  end

  cmp_l1_chains #(.PASS_B(PASS_B)) u_chains (
    .a(a), .b(b), .x(x), .e(e), .mag(mag), .eq(eq)
  );
endmodule
