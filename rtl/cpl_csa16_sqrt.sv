// cpl_csa16_sqrt - 16-bit square-root carry-select adder from CPL blocks.
//
// Five carry-select blocks of 2, 2, 3, 4 and 5 bits, LSB first. Block sizes
// grow by one so that, ideally, each block's pre-computed result is ready
// just as the carry from the block below arrives. The carry passes five
// block multiplexers. In the source design this variant turned out slower
// than the linear one, because its small blocks do not use the internal
// carry selection fully.
// Interface: a, b, cin in; sum, cout out. Timing: combinational.
//
// The five-block square-root structure follows the source design; the
// exact 2-2-3-4-5 split is this implementation's reading of it.
module cpl_csa16_sqrt (
  input  logic [15:0] a,
  input  logic [15:0] b,
  input  logic        cin,
  output logic [15:0] sum,
  output logic        cout
);
  logic c2, c4, c7, c11;

  cpl_cs_block #(.WIDTH(2)) u_b0 (.a(a[1:0]),   .b(b[1:0]),   .cin(cin), .sum(sum[1:0]),   .cout(c2));
  cpl_cs_block #(.WIDTH(2)) u_b1 (.a(a[3:2]),   .b(b[3:2]),   .cin(c2),  .sum(sum[3:2]),   .cout(c4));
  cpl_cs_block #(.WIDTH(3)) u_b2 (.a(a[6:4]),   .b(b[6:4]),   .cin(c4),  .sum(sum[6:4]),   .cout(c7));
  cpl_cs_block #(.WIDTH(4)) u_b3 (.a(a[10:7]),  .b(b[10:7]),  .cin(c7),  .sum(sum[10:7]),  .cout(c11));
  cpl_cs_block #(.WIDTH(5)) u_b4 (.a(a[15:11]), .b(b[15:11]), .cin(c11), .sum(sum[15:11]), .cout(cout));
endmodule
