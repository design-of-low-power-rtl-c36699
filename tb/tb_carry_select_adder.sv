// tb_carry_select_adder: self-checking test of carry_select_adder at the
// widths the 32x32 multiplier uses (32 and 48 bits, 4-bit blocks). Operands
// that make a carry cross every block boundary, and random operands, are
// compared against the '+' operator on wider integers.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_carry_select_adder;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [31:0] a32, b32, s32;  logic co32;
  logic [47:0] a48, b48, s48;  logic co48;

  carry_select_adder #(.WIDTH(32)) dut32 (.a(a32), .b(b32), .sum(s32), .cout(co32));
  carry_select_adder #(.WIDTH(48)) dut48 (.a(a48), .b(b48), .sum(s48), .cout(co48));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [47:0] x, input logic [47:0] y);
    logic [32:0] exp32;
    logic [48:0] exp48;
    a32 = x[31:0]; b32 = y[31:0];
    a48 = x;       b48 = y;
    @(posedge clk);
    exp32 = 33'(x[31:0]) + 33'(y[31:0]);
    exp48 = 49'(x) + 49'(y);
    checks += 2;
    if ({co32, s32} !== exp32) begin
      failures++;
      $display("FAIL csa32 %h + %h = %h, expected %h", x[31:0], y[31:0], {co32, s32}, exp32);
    end
    if ({co48, s48} !== exp48) begin
      failures++;
      $display("FAIL csa48 %h + %h = %h, expected %h", x, y, {co48, s48}, exp48);
    end
  endtask

  initial begin
    apply(48'h0, 48'h0);
    apply(48'hffff_ffff_ffff, 48'h1);
    apply(48'hffff_ffff_ffff, 48'hffff_ffff_ffff);
    apply(48'h0000_0000_000f, 48'h0000_0000_0001);
    apply(48'h0000_0fff_ffff, 48'h0000_0000_0001);
    apply(48'h0000_71c6_38e4, 48'h71c6_38e4_0000);
    for (int k = 0; k < 12; k++) apply(48'((48'h1 << (4*k)) - 1), 48'h1);
    repeat (2000) apply({16'($urandom), 32'($urandom)}, {16'($urandom), 32'($urandom)});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
