// booth_multiplier: unsigned WIDTH x WIDTH -> 2*WIDTH radix-4 Booth multiplier.
//
// The multiplier is scanned three bits at a time, in overlapping groups
// {y[2i+1], y[2i], y[2i-1]} (y[-1] = 0). Each group is recoded by
// mult_pkg::booth_encode into one of 0, +M, +2M, -2M, -M, where M is the
// multiplicand, so only about WIDTH/2 partial products are formed instead of
// WIDTH; runs of equal bits (000, 111) contribute nothing. The partial
// products are sign-extended, shifted by 2i and summed.
// The operands are unsigned: the multiplier is zero-extended by two bits so
// that the top group never sees a set bit as a sign, which gives WIDTH/2+1
// groups. Unsigned operation is this design's reading of the source's own
// results, where the 16x16 Booth unit returns ffff*ffff = fffe0001.
// Ports multiplicand/multiplier/product follow the source's booth_multiplier
// instances. Purely combinational. WIDTH must be even.
module booth_multiplier
  import mult_pkg::*;
#(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0]   multiplicand,
  input  logic [WIDTH-1:0]   multiplier,
  output logic [2*WIDTH-1:0] product
);

  localparam int unsigned NGRP = WIDTH / 2 + 1;   // Booth groups
  localparam int unsigned PW   = 2 * WIDTH + 2;   // partial product width

  if (WIDTH % 2 != 0) begin : g_bad_width
    $error("booth_multiplier: WIDTH must be even");
  end

  // multiplier with y[-1] = 0 below and two zero bits above
  logic [WIDTH+2:0] y_ext;
  assign y_ext = {2'b00, multiplier, 1'b0};

  booth_op_e        op [NGRP];
  logic [PW-1:0]    pp [NGRP];

  always_comb begin
    logic [PW-1:0] m1, m2;
    m1 = PW'(multiplicand);
    m2 = PW'(multiplicand) << 1;
    for (int i = 0; i < NGRP; i++) begin
      op[i] = booth_encode(y_ext[2*i +: 3]);
      unique case (op[i])
        BOOTH_POS1: pp[i] = m1;
        BOOTH_POS2: pp[i] = m2;
        BOOTH_NEG1: pp[i] = ~m1 + 1'b1;
        BOOTH_NEG2: pp[i] = ~m2 + 1'b1;
        default:    pp[i] = '0;
      endcase
    end
  end

  always_comb begin
    logic [PW-1:0] acc;
    acc = '0;
    for (int i = 0; i < NGRP; i++) begin
      acc = acc + (pp[i] << (2 * i));
    end
    product = acc[2*WIDTH-1:0];
  end

endmodule
