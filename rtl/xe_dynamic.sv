// xe_dynamic - clocked one-bit compare cell (5-transistor dynamic XE block).
//
// While the precharge clock (CLK_a) is high both outputs are pre-discharged
// to 0, which is the neutral "no decision" state for the Level-1 chains:
// chain 1 is cut (e = 0) and chain 3 is not pulled (x = 0). While the clock
// is low the cell evaluates: x = a XOR b and e = a XNOR b, so exactly one of
// the two rails rises.
//
// The clock is meant to have a short high time (10-25 % duty cycle) so the
// pre-discharge phase, and with it the short-circuit current, is brief.
// Interface: a, b data bits; clk_pre active-high pre-discharge clock.
// Timing: combinational from every input, including the clock.
//
// The dual-rail pre-discharge behaviour follows the source design; reading
// the E rail as XNOR gated by the inverted clock (symmetric with the X rail)
// is this implementation's interpretation of its equations.
module xe_dynamic (
  input  logic a,
  input  logic b,
  input  logic clk_pre,  // 1 = pre-discharge, 0 = evaluate
  output logic x,        // a != b during evaluation, 0 during pre-discharge
  output logic e         // a == b during evaluation, 0 during pre-discharge
);
  always_comb begin
    x = (a ^ b) & ~clk_pre;
    e = ~(a ^ b) & ~clk_pre;
    // Dual-rail rule: at most one rail is high, never both.
    assert (!(x && e)) else $error("xe_dynamic: both rails high");
  end
endmodule
