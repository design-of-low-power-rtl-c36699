// tb_booths_16x16: self-checking test of booths_16x16. Both results, c from
// the direct 16x16 Booth unit and c1 from the four 8x8 Booth units and ripple
// adders, are compared with the '*' operator, first for the operand pairs of
// the published simulation (10*2 = 20, 22*2 = 44), then for corner and random
// operands.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_booths_16x16;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [15:0] a, b;
  logic [31:0] c, c1;

  booths_16x16 dut (.a(a), .b(b), .c(c), .c1(c1));

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
    checks += 2;
    if (c !== expect_c) begin
      failures++;
      $display("FAIL c  %h * %h = %h, expected %h", x, y, c, expect_c);
    end
    if (c1 !== expect_c) begin
      failures++;
      $display("FAIL c1 %h * %h = %h, expected %h", x, y, c1, expect_c);
    end
  endtask

  initial begin
    apply(16'd10, 16'd2);
    checks++; if (c !== 32'd20) failures++;
    apply(16'd22, 16'd2);
    checks++; if (c !== 32'd44) failures++;
    apply(16'hffff, 16'hffff);
    checks++; if (c1 !== 32'hfffe_0001) failures++;
    apply(16'h8000, 16'h0002);
    apply(16'h00ff, 16'hff00);
    apply(16'h0000, 16'hbeef);
    repeat (3000) apply(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
