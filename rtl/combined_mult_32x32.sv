// combined_mult_32x32: 32x32 -> 64-bit unsigned combined Booth-Vedic
// multiplier.
//
// The operands are split into 16-bit halves aH:aL and bH:bL. Following the
// Vedic "vertically and crosswise" scheme, four 16x16 multipliers form the
// half products in parallel, alternating Vedic and Booth units:
//   z1 vedic_16x16  : q0 = aL*bL
//   z2 booths_16x16 : q1 = aH*bL
//   z3 vedic_16x16  : q2 = aL*bH
//   z4 booths_16x16 : q3 = aH*bH
// Three carry select adders add them:
//   add_32    : q4 = {16'b0, q0[31:16]} + q1          (32 bits)
//   add_48    : q5 = {16'b0, q2} + {q3, 16'b0}        (48 bits)
//   add_48_v2 : q6 = {16'b0, q4} + q5                 (48 bits)
//   c = {q6, q0[15:0]}
// None of the sums overflows its width. The unit types, instance names and
// the intermediate names follow the source; the adder widths (32, 48, 48)
// follow its simulation traces, where the source's schematic labels the two
// upper adders 64-bit. Which half pair feeds which unit is this design's
// reading. Unsigned operation follows the source's results
// (ffffffff * ffffffff = fffffffe00000001); signed operands are handled by
// signed_mult_32x32 around this core.
// Purely combinational: c = a * b.
module combined_mult_32x32 (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [63:0] c
);

  logic [31:0] q0, q1, q2, q3, q4;
  logic [31:0] temp1;
  logic [47:0] temp2, temp3, temp4, q5, q6;
  logic [31:0] c1_z2, c1_z4;        // second (8x8-based) Booth results, unused here
  logic        co_32, co_48, co_48v2; // adder carries out; always 0 here

  vedic_16x16  z1 (.a(a[15:0]),  .b(b[15:0]),  .c(q0));
  booths_16x16 z2 (.a(a[31:16]), .b(b[15:0]),  .c(q1), .c1(c1_z2));
  vedic_16x16  z3 (.a(a[15:0]),  .b(b[31:16]), .c(q2));
  booths_16x16 z4 (.a(a[31:16]), .b(b[31:16]), .c(q3), .c1(c1_z4));

  assign temp1 = {16'b0, q0[31:16]};
  assign temp2 = {16'b0, q2};
  assign temp3 = {q3, 16'b0};
  assign temp4 = {16'b0, q4};

  carry_select_adder #(.WIDTH(32)) add_32 (
    .a(temp1), .b(q1), .sum(q4), .cout(co_32));
  carry_select_adder #(.WIDTH(48)) add_48 (
    .a(temp2), .b(temp3), .sum(q5), .cout(co_48));
  carry_select_adder #(.WIDTH(48)) add_48_v2 (
    .a(temp4), .b(q5), .sum(q6), .cout(co_48v2));

  assign c = {q6, q0[15:0]};

endmodule
