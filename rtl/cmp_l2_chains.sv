// cmp_l2_chains - chain logic shared by the static and dynamic Level-2
// sub-blocks. Node n1 of chain 1 holds: mag_in of the most significant group
// whose eq_in is 0, or 1 when all groups are equal. mag = NOT n1 and
// eq = AND of eq_in. Timing: combinational.
module cmp_l2_chains (
  input  logic [3:0] mag_in,
  input  logic [3:0] eq_in,
  output logic       mag,
  output logic       eq
);
  logic n1;

  always_comb begin
    n1 = 1'b1;
    for (int i = 0; i < 4; i++) begin  // lowest priority first, MSB group last wins
      if (!eq_in[i]) n1 = mag_in[i];
    end
    mag = ~n1;
    eq  = &eq_in;
  end
endmodule
