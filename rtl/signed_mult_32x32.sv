// signed_mult_32x32: signed 32x32 -> 64-bit multiplier around the unsigned
// combined Booth-Vedic core.
//
// The two sign bits select one of four conditions:
//   a >= 0, b >= 0 : p =  |a|*|b|
//   a <  0, b >= 0 : p = -(|a|*|b|)
//   a >= 0, b <  0 : p = -(|a|*|b|)
//   a <  0, b <  0 : p =  |a|*|b|
// The magnitudes (|-2^31| = 2^31 fits the 32-bit unsigned core) go through
// combined_mult_32x32 and the product is negated when exactly one operand is
// negative. The source states that the 32x32 design is signed and that it
// distinguishes four sign conditions, without spelling them out; this
// sign-magnitude treatment is this design's reading of that.
// Purely combinational: p = a * b in two's complement.
module signed_mult_32x32 (
  input  logic signed [31:0] a,
  input  logic signed [31:0] b,
  output logic signed [63:0] p
);

  logic [31:0] a_mag, b_mag;
  logic [63:0] p_mag;

  assign a_mag = a[31] ? 32'(-a) : 32'(a);
  assign b_mag = b[31] ? 32'(-b) : 32'(b);

  combined_mult_32x32 u_core (.a(a_mag), .b(b_mag), .c(p_mag));

  always_comb begin
    unique case ({a[31], b[31]})
      2'b00, 2'b11: p = p_mag;
      default:      p = -p_mag;     // 2'b01, 2'b10
    endcase
  end

endmodule
