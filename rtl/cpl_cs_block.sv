// cpl_cs_block - CPL adder block with internal carry selection.
//
// The block adds WIDTH bits (4 in the source design) so that its carry in
// only has to pass through one final 2:1 multiplexer to reach every output.
//
// How it works:
//   1. One CPL cell per bit gives s0/s0_n, c0 and c1 (see cpl_adder_cell).
//   2. The bits are split into 2-bit sections (the last one may have 1 bit).
//      Each section computes its sums and carry out for both values of its
//      own carry in: bit 0 of a section uses s0 / s0_n and c0 / c1 directly,
//      bit 1 selects between the complementary rails with the predicted
//      carry of bit 0.
//   3. Internal carry selection: for the assumption "block carry in = 1"
//      the predicted carry out of section 0 (N1 in the source) selects the
//      matching results of section 1; for "block carry in = 0" the other
//      predicted carry (N2) does the same. Further sections chain the same
//      way, so both complete WIDTH-bit results exist before cin arrives.
//   4. cin selects one of the two results: sum and cout appear together.
// Interface: a, b, cin in; sum, cout out. Timing: combinational; the path
// from cin to any output is a single multiplexer.
//
// The two-section structure of the 4-bit block and its internal carry
// selection follow the source design. Widths other than 4 (used by the
// square-root adder) extend the same section scheme; that generalisation is
// this implementation's choice.
module cpl_cs_block #(
  parameter int WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int NSEC = (WIDTH + 1) / 2;

  logic [WIDTH-1:0] s0, s0_n, c0, c1;

  for (genvar i = 0; i < WIDTH; i++) begin : g_cell
    cpl_adder_cell u_cell (
      .a(a[i]), .b(b[i]), .s0(s0[i]), .s0_n(s0_n[i]),
      .c0(c0[i]), .c0_n(), .c1(c1[i]), .c1_n()
    );
  end

  // Per-bit results of each section for section carry in 0 ([0]) and 1 ([1]).
  logic [1:0][WIDTH-1:0] sec_sum;
  logic [1:0][NSEC-1:0]  sec_cout;
  // Whole-block results for block carry in 0 ([0]) and 1 ([1]).
  logic [1:0][WIDTH-1:0] blk_sum;
  logic [1:0]            blk_cout;

  always_comb begin
    logic c;
    // Step 2: both carry-in cases of every section.
    for (int h = 0; h < 2; h++) begin
      for (int k = 0; k < NSEC; k++) begin
        c = (h == 1);
        for (int j = 2 * k; j < 2 * k + 2; j++) begin
          if (j < WIDTH) begin
            sec_sum[h][j] = c ? s0_n[j] : s0[j];
            c             = c ? c1[j] : c0[j];
          end
        end
        sec_cout[h][k] = c;
      end
    end
    // Step 3: internal carry selection across sections.
    for (int h = 0; h < 2; h++) begin
      c = (h == 1);
      for (int k = 0; k < NSEC; k++) begin
        for (int j = 2 * k; j < 2 * k + 2; j++) begin
          if (j < WIDTH) blk_sum[h][j] = c ? sec_sum[1][j] : sec_sum[0][j];
        end
        c = c ? sec_cout[1][k] : sec_cout[0][k];
      end
      blk_cout[h] = c;
    end
    // A carry in of 1 can never remove a carry out that a carry in of 0 gives.
    assert (!(blk_cout[0] && !blk_cout[1])) else $error("cpl_cs_block: carry predictions inverted");
    // Step 4: final selection by the real carry in.
    sum  = cin ? blk_sum[1] : blk_sum[0];
    cout = cin ? blk_cout[1] : blk_cout[0];
  end
endmodule
