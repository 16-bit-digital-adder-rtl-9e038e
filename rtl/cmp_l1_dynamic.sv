// cmp_l1_dynamic - Level-1 dynamic 4-bit comparator sub-block.
//
// The static Level-1 block with two clocked devices added: node N1 of
// chain 1 is precharged to 1 and node N2 of chain 3 is pre-discharged to 0
// while clk_pre (CLK_b) is high, so during precharge the block outputs
// mag = 0 and eq = 1. The pre-discharge of N2 takes over the job of chain 2
// (pulling N2 low when all bits are equal). While clk_pre is low the block
// evaluates exactly like the static one.
//
// XE_DYNAMIC = 1 uses the 5-transistor dynamic XE cell clocked by clk_xe
// (CLK_a), as in the full dynamic comparator; XE_DYNAMIC = 0 uses the static
// XE cell, as in the partially dynamic comparator, and clk_xe is then
// unused. PASS_B selects AG (1) or BG (0) as for the static block.
// Timing: combinational from the data and from both clocks; the outputs are
// meaningful while both clocks are low.
//
// The precharge nodes follow the source design. Clocks are active-high
// precharge pulses in this implementation; a pMOS device driven by the
// complement of a clock is folded into the same input.
module cmp_l1_dynamic #(
  parameter bit PASS_B     = 1'b1,
  parameter bit XE_DYNAMIC = 1'b1
) (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       clk_xe,   // CLK_a: XE pre-discharge (XE_DYNAMIC only)
  input  logic       clk_pre,  // CLK_b: N1 precharge / N2 pre-discharge
  output logic       mag,
  output logic       eq
);
  logic [3:0] x, e;
  logic       mag_eval, eq_eval;

  for (genvar i = 0; i < 4; i++) begin : g_xe
    if (XE_DYNAMIC) begin : g_dyn
      xe_dynamic u_xe (.a(a[i]), .b(b[i]), .clk_pre(clk_xe), .x(x[i]), .e(e[i]));
    end else begin : g_stat
      xe_static u_xe (.a(a[i]), .b(b[i]), .x(x[i]), .e(e[i]));
    end
  end

  cmp_l1_chains #(.PASS_B(PASS_B)) u_chains (
    .a(a), .b(b), .x(x), .e(e), .mag(mag_eval), .eq(eq_eval)
  );

  always_comb begin
    mag = clk_pre ? 1'b0 : mag_eval;  // N1 precharged high
    eq  = clk_pre ? 1'b1 : eq_eval;   // N2 pre-discharged low
  end
endmodule
