// booths_16x16: 16x16 -> 32-bit unsigned Booth multiplier.
//
// Two results are produced, as in the source's schematic and simulation:
//  - c is the product of a single 16x16 radix-4 Booth multiplier (instance
//    p1, "prod"), which is the block's output in the schematic;
//  - c1 is the same product assembled Vedic-style from four 8x8 Booth
//    multipliers (z1..z4) and three ripple carry adders (z5..z7):
//      q0 = aL*bL, q1 = aH*bL, q2 = aL*bH, q3 = aH*bH  (byte halves)
//      q4 = q1 + {8'b0, q0[15:8]}
//      q5 = {8'b0, q2} + {q3, 8'b0}
//      q6 = {8'b0, q4} + q5
//      c1 = {q6, q0[7:0]}
// Both equal a*b. The source's schematic symbol also shows a 1-bit input "v"
// whose function is not given; it is not built here. Byte-to-block
// assignment is this design's reading. Purely combinational.
module booths_16x16 (
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [31:0] c,
  output logic [31:0] c1
);

  logic [15:0] q0, q1, q2, q3, q4;
  logic [15:0] temp1;
  logic [23:0] temp2, temp3, temp4, q5, q6;
  logic        co5, co6, co7;   // carries out of the adders; always 0 here

  booth_multiplier #(.WIDTH(8)) z1 (.multiplicand(a[7:0]),  .multiplier(b[7:0]),  .product(q0));
  booth_multiplier #(.WIDTH(8)) z2 (.multiplicand(a[15:8]), .multiplier(b[7:0]),  .product(q1));
  booth_multiplier #(.WIDTH(8)) z3 (.multiplicand(a[7:0]),  .multiplier(b[15:8]), .product(q2));
  booth_multiplier #(.WIDTH(8)) z4 (.multiplicand(a[15:8]), .multiplier(b[15:8]), .product(q3));

  assign temp1 = {8'b0, q0[15:8]};
  assign temp2 = {8'b0, q2};
  assign temp3 = {q3, 8'b0};
  assign temp4 = {8'b0, q4};

  ripple_carry_adder #(.WIDTH(16)) z5 (
    .input1(q1), .input2(temp1), .cin(1'b0), .answer(q4), .cout(co5));
  ripple_carry_adder #(.WIDTH(24)) z6 (
    .input1(temp2), .input2(temp3), .cin(1'b0), .answer(q5), .cout(co6));
  ripple_carry_adder #(.WIDTH(24)) z7 (
    .input1(temp4), .input2(q5), .cin(1'b0), .answer(q6), .cout(co7));

  assign c1 = {q6, q0[7:0]};

  // p1: direct 16x16 radix-4 Booth multiplier driving the block output
  booth_multiplier #(.WIDTH(16)) p1 (.multiplicand(a), .multiplier(b), .product(c));

endmodule
