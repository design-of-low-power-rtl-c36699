// fp_ref_pkg: reference model of single-precision multiplication for the
// testbenches, written independently of the RTL.
//  - to_real(): value of a finite, normal pattern as a real number.
//  - ref_mul(): exact 48-bit significand product, normalised and truncated
//    to 23 fraction bits; zero/subnormal operands read as zero; NaN operand
//    or infinity*zero gives 7fc00000; infinity otherwise gives a signed
//    infinity; exponent overflow gives infinity and underflow zero.
package fp_ref_pkg;

  // value of a finite, normal single-precision pattern
  function automatic real to_real(input logic [31:0] f);
    real v;
    int  e;
    v = 1.0 + real'(f[22:0]) / 8388608.0;
    e = int'(f[30:23]) - 127;
    for (int i = 0; i < e; i++)  v = v * 2.0;
    for (int i = 0; i > e; i--)  v = v / 2.0;
    return f[31] ? -v : v;
  endfunction

  // reference model: exact significand product, truncated to 23 bits
  function automatic logic [31:0] ref_mul(input logic [31:0] x, input logic [31:0] y);
    logic        s = x[31] ^ y[31];
    int          ex = int'(x[30:23]), ey = int'(y[30:23]);
    logic [47:0] prod;
    int          e;
    bit x_nan = (ex == 255) && (x[22:0] != 0), y_nan = (ey == 255) && (y[22:0] != 0);
    bit x_inf = (ex == 255) && (x[22:0] == 0), y_inf = (ey == 255) && (y[22:0] == 0);
    if (x_nan || y_nan || (x_inf && ey == 0) || (y_inf && ex == 0)) return 32'h7fc00000;
    if (x_inf || y_inf) return {s, 8'hff, 23'h0};
    if (ex == 0 || ey == 0) return {s, 31'h0};
    prod = 48'({1'b1, x[22:0]}) * 48'({1'b1, y[22:0]});
    e = ex + ey - 127;
    if (prod >= 48'h8000_0000_0000) begin
      prod = prod >> 1;
      e++;
    end
    if (e >= 255) return {s, 8'hff, 23'h0};
    if (e <= 0)   return {s, 31'h0};
    return {s, 8'(e), prod[45:23]};
  endfunction

endpackage
