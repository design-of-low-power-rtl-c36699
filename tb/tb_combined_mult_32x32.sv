// tb_combined_mult_32x32: self-checking test of combined_mult_32x32.
// The three operand pairs of the published simulation are applied and both
// the product and the intermediate values are compared with that trace:
//   0000ffff^2 = 00000000fffe0001 (q4 = 0000fffe, q6 = 00000000fffe)
//   aaaaaaaa^2 = 71c71c70e38e38e4 (q0..q3 = 71c638e4, q4 = 71c6aaaa,
//                                  q5 = 71c6aaaa38e4, q6 = 71c71c70e38e)
//   ffffffff^2 = fffffffe00000001 (q4 = fffeffff, q5 = fffeffff0001,
//                                  q6 = fffffffe0000)
// Then corner and random operands are compared with the '*' operator on
// 64-bit integers.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_combined_mult_32x32;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [31:0] a, b;
  logic [63:0] c;

  combined_mult_32x32 dut (.a(a), .b(b), .c(c));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input logic [63:0] got, input logic [63:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s = %h, expected %h", what, got, want);
    end
  endtask

  task automatic apply(input logic [31:0] x, input logic [31:0] y);
    a = x; b = y;
    @(posedge clk);
    expect_eq($sformatf("%h*%h", x, y), c, 64'(x) * 64'(y));
  endtask

  initial begin
    apply(32'h0000ffff, 32'h0000ffff);
    expect_eq("c",  c, 64'h00000000_fffe0001);
    expect_eq("q0", 64'(dut.q0), 64'hfffe0001);
    expect_eq("q4", 64'(dut.q4), 64'h0000fffe);
    expect_eq("q6", 64'(dut.q6), 64'h00000000fffe);

    apply(32'haaaaaaaa, 32'haaaaaaaa);
    expect_eq("c",  c, 64'h71c71c70_e38e38e4);
    expect_eq("q1", 64'(dut.q1), 64'h71c638e4);
    expect_eq("q3", 64'(dut.q3), 64'h71c638e4);
    expect_eq("q4", 64'(dut.q4), 64'h71c6aaaa);
    expect_eq("q5", 64'(dut.q5), 64'h71c6aaaa38e4);
    expect_eq("q6", 64'(dut.q6), 64'h71c71c70e38e);

    apply(32'hffffffff, 32'hffffffff);
    expect_eq("c",  c, 64'hfffffffe_00000001);
    expect_eq("q4", 64'(dut.q4), 64'hfffeffff);
    expect_eq("q5", 64'(dut.q5), 64'hfffeffff0001);
    expect_eq("q6", 64'(dut.q6), 64'hfffffffe0000);

    apply(32'h0001_0000, 32'h0001_0000);
    apply(32'h8000_0000, 32'h0000_0002);
    apply(32'h1234_5678, 32'h0000_0000);
    apply(32'hffff_0000, 32'h0000_ffff);
    repeat (3000) apply($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
