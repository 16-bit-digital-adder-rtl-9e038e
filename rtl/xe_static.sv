// xe_static - one-bit compare cell ("XE" block) of the static comparator.
//
// For one bit position it reports whether the two data bits differ (x, the
// XOR) or agree (e, the XNOR). In silicon this is a 12-transistor
// complementary pass-transistor cell that produces both rails at once; here
// each rail is one Boolean output. The cell is purely combinational and has
// no clock; outputs follow the inputs after one gate delay.
//
// Function and structure follow the source design; modelling the
// complementary rails as plain logic is this implementation's choice.
module xe_static (
  input  logic a,  // bit of data A
  input  logic b,  // bit of data B
  output logic x,  // 1 when a != b
  output logic e   // 1 when a == b
);
  always_comb begin
    x = a ^ b;
    e = ~(a ^ b);
  end
endmodule
