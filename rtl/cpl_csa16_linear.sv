// cpl_csa16_linear - 16-bit linear carry-select adder from CPL blocks.
//
// N/M carry-select blocks of M bits each (4 x 4 in the source design). Each
// block has already worked out its result for both carry-in values, so the
// carry only ripples from block to block through one multiplexer per block:
// four carry ripples for 16 bits, against eight for the regular CPL adder
// that produces a carry every two bits.
// Interface: a, b, cin in; sum, cout out. Timing: combinational.
//
// Structure and sizes follow the source design.
module cpl_csa16_linear #(
  parameter int N = 16,
  parameter int M = 4
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);
  localparam int P = N / M;

  initial assert (N % M == 0) else $error("N must be a multiple of M");

  logic [P:0] carry;
  assign carry[0] = cin;

  for (genvar p = 0; p < P; p++) begin : g_blk
    cpl_cs_block #(.WIDTH(M)) u_blk (
      .a(a[M*p +: M]), .b(b[M*p +: M]), .cin(carry[p]),
      .sum(sum[M*p +: M]), .cout(carry[p+1])
    );
  end

  assign cout = carry[P];
endmodule
