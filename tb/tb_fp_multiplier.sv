// tb_fp_multiplier: self-checking test of fp_multiplier.
//  - The two operand pairs of the published simulation:
//      3f000000 (0.5)     * 3fa00000 (1.25) = 3f200000 (0.625)
//      7e000000 (4.25e37) * 3fa00000 (1.25) = 7e200000 (5.32e37)
//  - Operands whose significands have at most 12 significant bits, so the
//    product is exact: the result, read back as a real number, must equal
//    the real product of the operands.
//  - Random operands against an integer reference model with truncation.
//  - Special values: zero, infinity, NaN, overflow and underflow.
// Each outcome class is counted; one that never occurred is a failure.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_fp_multiplier;
  import fp_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_norm = 0, n_nonorm = 0, n_ovf = 0, n_udf = 0, n_zero = 0, n_inf = 0, n_nan = 0;

  logic [31:0] X, Y, MULT;

  fp_multiplier dut (.X(X), .Y(Y), .MULT(MULT));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic classify(input logic [31:0] x, input logic [31:0] y, input logic [31:0] r);
    int e = int'(x[30:23]) + int'(y[30:23]) - 127;
    bit special_in = (x[30:23] == 8'hff) || (y[30:23] == 8'hff);
    if (r[30:0] == 31'h7fc00000) n_nan++;
    else if (special_in && r[30:23] == 8'hff) n_inf++;
    else if (x[30:23] == 0 || y[30:23] == 0) n_zero++;
    else if (r[30:23] == 8'hff) n_ovf++;
    else if (r[30:0] == 0) n_udf++;
    else if (int'(r[30:23]) == e + 1) n_norm++;
    else n_nonorm++;
  endtask

  task automatic apply(input logic [31:0] x, input logic [31:0] y);
    logic [31:0] expect_r;
    X = x; Y = y;
    @(posedge clk);
    expect_r = ref_mul(x, y);
    checks++;
    if (MULT !== expect_r) begin
      failures++;
      $display("FAIL %h * %h = %h, expected %h", x, y, MULT, expect_r);
    end
    classify(x, y, MULT);
  endtask

  task automatic expect_eq(input logic [31:0] want);
    checks++;
    if (MULT !== want) begin
      failures++;
      $display("FAIL %h * %h = %h, expected %h", X, Y, MULT, want);
    end
  endtask

  initial begin
    apply(32'h3f000000, 32'h3fa00000);  expect_eq(32'h3f200000);
    apply(32'h7e000000, 32'h3fa00000);  expect_eq(32'h7e200000);
    apply(32'h3fc00000, 32'h3fc00000);  expect_eq(32'h40100000);   // 1.5*1.5 = 2.25
    apply(32'hc0000000, 32'h40400000);  expect_eq(32'hc0c00000);   // -2*3 = -6
    // exact products checked as real numbers
    repeat (500) begin
      logic [31:0] x, y;
      x = {1'($urandom), 8'(64 + $urandom_range(0, 127)), 11'($urandom), 12'h0};
      y = {1'($urandom), 8'(64 + $urandom_range(0, 127)), 11'($urandom), 12'h0};
      apply(x, y);
      checks++;
      if (to_real(MULT) != to_real(x) * to_real(y)) begin
        failures++;
        $display("FAIL real %h * %h: %g vs %g", x, y, to_real(MULT), to_real(x) * to_real(y));
      end
    end
    // special values
    apply(32'h00000000, 32'h3f800000);  expect_eq(32'h00000000);
    apply(32'h80000000, 32'h3f800000);  expect_eq(32'h80000000);
    apply(32'h7f800000, 32'h40000000);  expect_eq(32'h7f800000);
    apply(32'h7f800000, 32'hc0000000);  expect_eq(32'hff800000);
    apply(32'h7f800000, 32'h00000000);  expect_eq(32'h7fc00000);
    apply(32'h7fc00001, 32'h3f800000);  expect_eq(32'h7fc00000);
    apply(32'h7f000000, 32'h7f000000);  expect_eq(32'h7f800000);   // overflow
    apply(32'h00800000, 32'h00800000);  expect_eq(32'h00000000);   // underflow
    apply(32'h7f7fffff, 32'h3f800000);  expect_eq(32'h7f7fffff);   // largest * 1
    apply(32'h00800000, 32'h3f800000);  expect_eq(32'h00800000);   // smallest normal * 1
    repeat (3000) apply($urandom, $urandom);
    begin
      int cnt [7];
      cnt = '{n_norm, n_nonorm, n_ovf, n_udf, n_zero, n_inf, n_nan};
      for (int k = 0; k < 7; k++) begin
        checks++;
        if (cnt[k] == 0) begin
          failures++;
          $display("FAIL outcome class %0d never exercised", k);
        end
      end
    end
    $display("classes norm:%0d nonorm:%0d ovf:%0d udf:%0d zero:%0d inf:%0d nan:%0d",
             n_norm, n_nonorm, n_ovf, n_udf, n_zero, n_inf, n_nan);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
