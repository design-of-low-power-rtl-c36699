// mult_pkg: types and constants shared by the Booth/Vedic multiplier family.
//
// - booth_op_e and booth_encode(): the radix-4 Booth recoding used by
//   booth_multiplier. Three adjacent multiplier bits {y[2i+1], y[2i], y[2i-1]}
//   select one of five partial products: 0, +M, +2M, -2M or -M.
// - float32_t and the IEEE 754 single-precision constants used by
//   fp_multiplier (bias 127, all-ones exponent 255).
// Nothing here holds state; it is pure types, constants and a function.
package mult_pkg;

  // Radix-4 Booth digit: which multiple of the multiplicand a group adds.
  typedef enum logic [2:0] {
    BOOTH_ZERO = 3'd0,
    BOOTH_POS1 = 3'd1,
    BOOTH_POS2 = 3'd2,
    BOOTH_NEG2 = 3'd3,
    BOOTH_NEG1 = 3'd4
  } booth_op_e;

  // Recode one overlapping group of three multiplier bits.
  function automatic booth_op_e booth_encode(input logic [2:0] grp);
    unique case (grp)
      3'b000, 3'b111: return BOOTH_ZERO;
      3'b001, 3'b010: return BOOTH_POS1;
      3'b011:         return BOOTH_POS2;
      3'b100:         return BOOTH_NEG2;
      default:        return BOOTH_NEG1;   // 3'b101, 3'b110
    endcase
  endfunction

  // IEEE 754 single precision.
  localparam int unsigned FP_EXP_W  = 8;
  localparam int unsigned FP_FRAC_W = 23;
  localparam int unsigned FP_BIAS   = 127;   // 7f
  localparam int unsigned FP_E_MAX  = 255;   // ff: infinity / NaN exponent

  typedef struct packed {
    logic                 sign;
    logic [FP_EXP_W-1:0]  exponent;
    logic [FP_FRAC_W-1:0] fraction;
  } float32_t;

  localparam float32_t FP_QNAN = '{sign: 1'b0, exponent: 8'hff, fraction: 23'h400000};

endpackage
