// tb_ripple_carry_adder: self-checking test of ripple_carry_adder at the two
// widths the multipliers use (16 and 24 bits). Corner operands (all ones,
// carry rippling through every bit) and random operands with both carry-in
// values are compared against the '+' operator on wider integers.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_ripple_carry_adder;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [15:0] a16, b16, s16;  logic ci16, co16;
  logic [23:0] a24, b24, s24;  logic ci24, co24;

  ripple_carry_adder #(.WIDTH(16)) dut16 (.input1(a16), .input2(b16), .cin(ci16), .answer(s16), .cout(co16));
  ripple_carry_adder #(.WIDTH(24)) dut24 (.input1(a24), .input2(b24), .cin(ci24), .answer(s24), .cout(co24));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [23:0] x, input logic [23:0] y, input logic ci);
    logic [16:0] exp16;
    logic [24:0] exp24;
    a16 = x[15:0]; b16 = y[15:0]; ci16 = ci;
    a24 = x;       b24 = y;       ci24 = ci;
    @(posedge clk);
    exp16 = 17'(x[15:0]) + 17'(y[15:0]) + 17'(ci);
    exp24 = 25'(x) + 25'(y) + 25'(ci);
    checks += 2;
    if ({co16, s16} !== exp16) begin
      failures++;
      $display("FAIL rca16 %h + %h + %0d = %h, expected %h", x[15:0], y[15:0], ci, {co16, s16}, exp16);
    end
    if ({co24, s24} !== exp24) begin
      failures++;
      $display("FAIL rca24 %h + %h + %0d = %h, expected %h", x, y, ci, {co24, s24}, exp24);
    end
  endtask

  initial begin
    apply(24'h0, 24'h0, 1'b0);
    apply(24'hffffff, 24'h000001, 1'b0);
    apply(24'hffffff, 24'h000000, 1'b1);
    apply(24'hffffff, 24'hffffff, 1'b1);
    apply(24'h00ffff, 24'h000001, 1'b0);
    apply(24'haaaaaa, 24'h555555, 1'b1);
    repeat (2000) apply(24'($urandom), 24'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
