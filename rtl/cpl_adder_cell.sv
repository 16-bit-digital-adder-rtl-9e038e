// cpl_adder_cell - one-bit complementary pass-transistor (CPL) adder cell.
//
// A half adder that also gives the carry for the case "carry in = 1":
//   s0 = a XOR b   sum when the carry in is 0 (its complement when it is 1)
//   c0 = a AND b   carry out when the carry in is 0
//   c1 = a OR  b   carry out when the carry in is 1
// together with the complement of each. CPL produces both rails of every
// function from the same pass network, which is what lets the carry-select
// blocks pre-compute both carry-in cases without a second adder.
// Timing: combinational.
//
// Function and outputs follow the source design.
module cpl_adder_cell (
  input  logic a,
  input  logic b,
  output logic s0,    // a ^ b
  output logic s0_n,  // ~(a ^ b)
  output logic c0,    // a & b
  output logic c0_n,  // ~(a & b)
  output logic c1,    // a | b
  output logic c1_n   // ~(a | b)
);
  always_comb begin
    s0   = a ^ b;
    s0_n = ~(a ^ b);
    c0   = a & b;
    c0_n = ~(a & b);
    c1   = a | b;
    c1_n = ~(a | b);
  end
endmodule
