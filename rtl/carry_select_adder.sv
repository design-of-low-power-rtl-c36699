// carry_select_adder: WIDTH-bit carry select adder built from BLOCK-bit
// ripple carry adders.
//
// The lowest block is a plain ripple adder with carry-in 0. Every higher block
// is computed twice in parallel, once assuming a carry-in of 0 and once of 1,
// and the real carry from the block below selects one of the two results and
// one of the two carry-outs. The critical path is then one block ripple plus
// one 2:1 multiplexer per block instead of a full WIDTH-bit ripple.
// It is the adder used to combine the four 16x16 partial products in the
// 32x32 multiplier (instances add_32, add_48, add_48_v2). The ports a/b/sum
// follow those instance pins; cout is this design's addition. The block size
// is this design's choice (the source names the adder but not its blocks).
// Purely combinational: sum = a + b (mod 2^WIDTH). WIDTH must be a multiple
// of BLOCK.
module carry_select_adder #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned BLOCK = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned NBLK = WIDTH / BLOCK;

  if (WIDTH % BLOCK != 0 || NBLK == 0) begin : g_bad_size
    $error("carry_select_adder: WIDTH must be a nonzero multiple of BLOCK");
  end

  logic [NBLK:0] blk_carry;
  assign blk_carry[0] = 1'b0;

  // lowest block: single ripple adder, carry-in 0
  ripple_carry_adder #(.WIDTH(BLOCK)) u_rca_lo (
    .input1 (a[BLOCK-1:0]),
    .input2 (b[BLOCK-1:0]),
    .cin    (1'b0),
    .answer (sum[BLOCK-1:0]),
    .cout   (blk_carry[1])
  );

  for (genvar k = 1; k < NBLK; k++) begin : g_blk
    logic [BLOCK-1:0] s0, s1;
    logic             c0, c1;

    ripple_carry_adder #(.WIDTH(BLOCK)) u_rca_c0 (
      .input1 (a[k*BLOCK +: BLOCK]),
      .input2 (b[k*BLOCK +: BLOCK]),
      .cin    (1'b0),
      .answer (s0),
      .cout   (c0)
    );
    ripple_carry_adder #(.WIDTH(BLOCK)) u_rca_c1 (
      .input1 (a[k*BLOCK +: BLOCK]),
      .input2 (b[k*BLOCK +: BLOCK]),
      .cin    (1'b1),
      .answer (s1),
      .cout   (c1)
    );

    // carry from the block below selects the precomputed result
    assign sum[k*BLOCK +: BLOCK] = blk_carry[k] ? s1 : s0;
    assign blk_carry[k+1]        = blk_carry[k] ? c1 : c0;
  end

  assign cout = blk_carry[NBLK];

endmodule
