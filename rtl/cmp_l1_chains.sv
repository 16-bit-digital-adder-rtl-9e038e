// cmp_l1_chains - the three transistor chains shared by the static and the
// dynamic Level-1 comparator sub-blocks.
//
// Inputs are the X (unequal) and E (equal) rails of four XE cells plus the
// data bits that chain 1 passes. Node N1 takes the passed bit of the most
// significant position whose X is 1, provided every E above it is 1; with no
// such position N1 is 1. Node N2 is 1 when any X is 1. The outputs are the
// inverted nodes. If the XE rails are both 0 (pre-discharged) no position is
// selected, N1 stays 1 and N2 stays 0, so the block reads as "equal".
// Timing: combinational.
module cmp_l1_chains #(
  parameter bit PASS_B = 1'b1
) (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic [3:0] x,
  input  logic [3:0] e,
  output logic       mag,
  output logic       eq
);
  logic [3:0] pass_bits;
  logic       n1, n2, open;  // open: chain 1 still conducting from the MSB

  assign pass_bits = PASS_B ? b : a;

  always_comb begin
    n1   = 1'b1;
    open = 1'b1;
    for (int i = 3; i >= 0; i--) begin
      if (open && x[i]) begin
        n1   = pass_bits[i];
        open = 1'b0;
      end else if (!e[i]) begin
        open = 1'b0;
      end
    end
    n2  = |x;
    mag = ~n1;
    eq  = ~n2;
  end
endmodule
