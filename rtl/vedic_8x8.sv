// vedic_8x8: 8x8 -> 16-bit unsigned multiplier following the Urdhva
// Tiryakbhyam ("vertically and crosswise") sutra.
//
// Result column k collects every bit product a[i]&b[j] with i+j == k (the
// vertical and crosswise pairings of the two operands), adds the carry left
// over from column k-1, keeps the least significant bit of that sum as result
// bit c[k] and passes the remaining bits on as the carry into column k+1. The
// carry into column 0 is zero. Column 15 has no bit products and receives only
// the final carry. This column-by-column procedure is the one the source
// describes for the sutra; writing the 8x8 block directly with it (rather than
// recursively from smaller Vedic blocks) is this design's choice, as the
// source names the 8x8 block but does not draw its insides.
// Purely combinational: c = a * b.
module vedic_8x8 (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] c
);

  localparam int N = 8;

  always_comb begin
    logic [4:0] col;     // column sum: at most 8 bit products + carry < 32
    logic [3:0] carry;   // carry into the next column, always < 16
    carry = '0;
    c     = '0;
    for (int k = 0; k < 2*N - 1; k++) begin
      col = 5'(carry);
      for (int i = 0; i < N; i++) begin
        if (k - i >= 0 && k - i < N) begin
          col = col + 5'(a[i] & b[k-i]);
        end
      end
      c[k]  = col[0];
      carry = col[4:1];
    end
    c[2*N-1] = carry[0];
  end

endmodule
