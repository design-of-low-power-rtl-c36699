// ripple_carry_adder: WIDTH-bit ripple carry adder.
//
// A chain of WIDTH full adders; the carry of bit i feeds bit i+1, so the delay
// grows linearly with WIDTH. It is the adder that sums the four partial
// products inside the 16x16 Vedic and Booth multipliers (instances add_16_bit
// and add_24_bit there). The ports input1/input2/answer follow those instance
// pins; the carry-in and carry-out are this design's addition so the same adder
// can serve as a block of carry_select_adder.
// Purely combinational: answer = input1 + input2 + cin (mod 2^WIDTH), with the
// bit shifted out on cout.
module ripple_carry_adder #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] input1,
  input  logic [WIDTH-1:0] input2,
  input  logic             cin,
  output logic [WIDTH-1:0] answer,
  output logic             cout
);

  logic [WIDTH:0] carry;

  assign carry[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_fa
    // one full adder
    assign answer[i]  = input1[i] ^ input2[i] ^ carry[i];
    assign carry[i+1] = (input1[i] & input2[i]) | (carry[i] & (input1[i] ^ input2[i]));
  end

  assign cout = carry[WIDTH];

endmodule
