// tb_vedic_16x16: self-checking test of vedic_16x16. The two operand pairs
// of the published simulation (0005*0004 = 00000014, 000f*0003 = 0000002d),
// corner values and random operands are compared with the '*' operator on
// 32-bit integers. For one operand pair the intermediate sums q4..q6 are
// also checked against values worked out by hand.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_vedic_16x16;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [15:0] a, b;
  logic [31:0] c;

  vedic_16x16 dut (.a(a), .b(b), .c(c));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [15:0] x, input logic [15:0] y);
    logic [31:0] expect_c;
    a = x; b = y;
    @(posedge clk);
    expect_c = 32'(x) * 32'(y);
    checks++;
    if (c !== expect_c) begin
      failures++;
      $display("FAIL %h * %h = %h, expected %h", x, y, c, expect_c);
    end
  endtask

  task automatic expect_eq(input string what, input logic [31:0] got, input logic [31:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s = %h, expected %h", what, got, want);
    end
  endtask

  initial begin
    apply(16'h0005, 16'h0004);
    expect_eq("c(5*4)", c, 32'h0000_0014);
    apply(16'h000f, 16'h0003);
    expect_eq("c(f*3)", c, 32'h0000_002d);
    apply(16'hffff, 16'hffff);
    expect_eq("c(ffff*ffff)", c, 32'hfffe_0001);
    // aaaa*aaaa: q0..q3 = aa*aa = 70e4; q4 = 70e4 + 70 = 7154;
    // q5 = 70e4 + 70e400 = 7154e4; q6 = 7154 + 7154e4 = 71c638
    apply(16'haaaa, 16'haaaa);
    expect_eq("q4", 32'(dut.q4), 32'h0000_7154);
    expect_eq("q5", 32'(dut.q5), 32'h0071_54e4);
    expect_eq("q6", 32'(dut.q6), 32'h0071_c638);
    apply(16'h0000, 16'h1234);
    apply(16'h8000, 16'h8000);
    repeat (3000) apply(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
