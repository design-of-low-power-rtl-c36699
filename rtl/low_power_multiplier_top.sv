// low_power_multiplier_top: the combined Booth-Vedic multiplier and its
// floating-point application, side by side.
//
//   int_a, int_b -> int_p : signed 32x32 -> 64-bit product
//                           (signed_mult_32x32 around combined_mult_32x32)
//   fp_x,  fp_y  -> fp_p  : IEEE 754 single-precision product
//                           (fp_multiplier, whose significand product is a
//                           second combined_mult_32x32)
// Both paths are purely combinational with no clock or reset; a user who
// wants registered timing puts flip-flops around this block. Bringing the two
// functions out on separate ports is this design's choice: the source
// presents the floating-point multiplier as an application of the integer
// one without giving a shared top level.
module low_power_multiplier_top (
  input  logic signed [31:0] int_a,
  input  logic signed [31:0] int_b,
  output logic signed [63:0] int_p,
  input  logic        [31:0] fp_x,
  input  logic        [31:0] fp_y,
  output logic        [31:0] fp_p
);

  signed_mult_32x32 u_int_mult (.a(int_a), .b(int_b), .p(int_p));

  fp_multiplier u_fp_mult (.X(fp_x), .Y(fp_y), .MULT(fp_p));

endmodule
