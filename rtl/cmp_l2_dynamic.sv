// cmp_l2_dynamic - Level-2 dynamic comparator sub-block.
//
// The static Level-2 block with one clocked pMOS added at node N1 of
// chain 1: while clk_pre (CLK_c) is high N1 is precharged to 1 and the
// magnitude output is 0. Chain 3 gets no precharge device, so eq stays a
// static function of eq_in; this keeps the EQ signal from racing ahead of
// the magnitude signal through the tree. While clk_pre is low the block
// evaluates like the static one (magnitude polarity flips per tier).
// Timing: combinational from the inputs and the clock.
//
// The placement of the single precharge device follows the source design.
module cmp_l2_dynamic (
  input  logic [3:0] mag_in,
  input  logic [3:0] eq_in,
  input  logic       clk_pre,  // 1 = precharge N1
  output logic       mag,
  output logic       eq
);
  logic mag_eval;

  cmp_l2_chains u_chains (.mag_in(mag_in), .eq_in(eq_in), .mag(mag_eval), .eq(eq));

  assign mag = clk_pre ? 1'b0 : mag_eval;
endmodule
