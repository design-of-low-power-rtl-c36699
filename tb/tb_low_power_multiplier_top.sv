// tb_low_power_multiplier_top: end-to-end test of low_power_multiplier_top at
// its default (and only) configuration.
// The integer side is driven with operands from all four sign conditions and
// compared with the signed '*' operator; the floating-point side with the
// published examples and random and special operands, compared with the
// reference model in fp_ref_pkg. Both sides are driven at the same time on
// every step. Every mechanism of the design is counted and one that never
// happened counts as a failure:
//   the four sign conditions of the signed multiplier; significand products
//   needing a normalisation shift and ones that do not; exponent overflow
//   and underflow; zero, infinite and NaN operands.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_low_power_multiplier_top;
  import fp_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  typedef enum int {
    M_SIGN_PP, M_SIGN_PN, M_SIGN_NP, M_SIGN_NN,
    M_FP_NORM_SHIFT, M_FP_NO_SHIFT, M_FP_OVERFLOW, M_FP_UNDERFLOW,
    M_FP_ZERO, M_FP_INF, M_FP_NAN, M_COUNT
  } mech_e;
  int seen [M_COUNT];

  logic signed [31:0] int_a, int_b;
  logic signed [63:0] int_p;
  logic        [31:0] fp_x, fp_y, fp_p;

  low_power_multiplier_top dut (
    .int_a(int_a), .int_b(int_b), .int_p(int_p),
    .fp_x(fp_x), .fp_y(fp_y), .fp_p(fp_p)
  );

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic signed [31:0] a, input logic signed [31:0] b,
                      input logic [31:0] x, input logic [31:0] y);
    logic signed [63:0] exp_p;
    logic        [31:0] exp_f;
    int                 e;
    int_a = a; int_b = b; fp_x = x; fp_y = y;
    @(posedge clk);
    exp_p = 64'(a) * 64'(b);
    exp_f = ref_mul(x, y);
    checks += 2;
    if (int_p !== exp_p) begin
      failures++;
      $display("FAIL int %0d * %0d = %0d, expected %0d", a, b, int_p, exp_p);
    end
    if (fp_p !== exp_f) begin
      failures++;
      $display("FAIL fp %h * %h = %h, expected %h", x, y, fp_p, exp_f);
    end
    // mechanisms
    seen[{a[31], b[31]} == 2'b00 ? M_SIGN_PP : {a[31], b[31]} == 2'b01 ? M_SIGN_PN :
         {a[31], b[31]} == 2'b10 ? M_SIGN_NP : M_SIGN_NN]++;
    e = int'(x[30:23]) + int'(y[30:23]) - 127;
    if (x[30:23] == 8'hff || y[30:23] == 8'hff) begin
      if (fp_p[30:0] == 31'h7fc00000) seen[M_FP_NAN]++;
      else seen[M_FP_INF]++;
    end else if (x[30:23] == 0 || y[30:23] == 0) seen[M_FP_ZERO]++;
    else if (fp_p[30:23] == 8'hff) seen[M_FP_OVERFLOW]++;
    else if (fp_p[30:0] == 0) seen[M_FP_UNDERFLOW]++;
    else if (int'(fp_p[30:23]) == e + 1) seen[M_FP_NORM_SHIFT]++;
    else seen[M_FP_NO_SHIFT]++;
  endtask

  initial begin
    // published floating-point examples, with the published 32x32 operands
    step(32'sh0000ffff, 32'sh0000ffff, 32'h3f000000, 32'h3fa00000);
    checks++; if (fp_p !== 32'h3f200000 || int_p !== 64'sh00000000fffe0001) failures++;
    step(32'shaaaaaaaa, 32'shaaaaaaaa, 32'h7e000000, 32'h3fa00000);
    checks++; if (fp_p !== 32'h7e200000) failures++;
    // signed view of aaaaaaaa^2 and ffffffff^2
    checks++; if (int_p !== 64'sh1c71c71c_e38e38e4) failures++;
    step(32'shffffffff, 32'shffffffff, 32'h3fc00000, 32'h3fc00000);
    checks++; if (int_p !== 64'sd1 || fp_p !== 32'h40100000) failures++;
    // special floating-point operands
    step(-32'sd3, 32'sd5, 32'h00000000, 32'h3f800000);
    step(32'sd3, -32'sd5, 32'h7f800000, 32'hc0000000);
    step(-32'sd3, -32'sd5, 32'h7f800000, 32'h00000000);
    step(32'sh80000000, 32'sh80000000, 32'h7f000000, 32'h7f000000);
    step(32'sh7fffffff, 32'sh80000000, 32'h00800000, 32'h00800000);
    repeat (5000) step($urandom, $urandom, $urandom, $urandom);
    for (int k = 0; k < M_COUNT; k++) begin
      checks++;
      if (seen[k] == 0) begin
        failures++;
        $display("FAIL mechanism %s never happened", mech_e'(k));
      end
    end
    for (int k = 0; k < M_COUNT; k++) $display("%-16s %0d", mech_e'(k), seen[k]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
