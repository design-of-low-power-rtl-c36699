// vedic_16x16: 16x16 -> 32-bit unsigned Vedic multiplier.
//
// Each operand is split into bytes, aH:aL and bH:bL, and four vedic_8x8 blocks
// form the crosswise and vertical byte products
//   q0 = aL*bL, q1 = aH*bL, q2 = aL*bH, q3 = aH*bH.
// Three ripple carry adders recombine them:
//   q4 = q1 + {8'b0, q0[15:8]}            (16 bits, add_16_bit)
//   q5 = {8'b0, q2} + {q3, 8'b0}          (24 bits, add_24_bit)
//   q6 = {8'b0, q4} + q5                  (24 bits, add_24_bit)
//   c  = {q6, q0[7:0]}
// None of the three sums can overflow its width. Instance names z1..z7 and the
// intermediate names q0..q6 and temp1..temp4 follow the source's schematic and
// simulation; which byte pair goes into which 8x8 block is this design's
// reading, as the schematic does not label it.
// Purely combinational: c = a * b.
module vedic_16x16 (
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [31:0] c
);

  logic [15:0] q0, q1, q2, q3, q4;
  logic [15:0] temp1;
  logic [23:0] temp2, temp3, temp4, q5, q6;
  logic        co5, co6, co7;   // carries out of the adders; always 0 here

  vedic_8x8 z1 (.a(a[7:0]),  .b(b[7:0]),  .c(q0));
  vedic_8x8 z2 (.a(a[15:8]), .b(b[7:0]),  .c(q1));
  vedic_8x8 z3 (.a(a[7:0]),  .b(b[15:8]), .c(q2));
  vedic_8x8 z4 (.a(a[15:8]), .b(b[15:8]), .c(q3));

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

  assign c = {q6, q0[7:0]};

endmodule
