// tb_signed_mult_32x32: self-checking test of signed_mult_32x32. Operands
// from each of the four sign conditions (++, -+, +-, --), the extremes
// -2^31 and 2^31-1, and random operands are compared with the signed '*'
// operator on 64-bit integers. Each sign condition is counted and a
// condition that never occurred counts as a failure.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_signed_mult_32x32;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cond_seen [4];

  logic signed [31:0] a, b;
  logic signed [63:0] p;

  signed_mult_32x32 dut (.a(a), .b(b), .p(p));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic signed [31:0] x, input logic signed [31:0] y);
    logic signed [63:0] expect_p;
    a = x; b = y;
    @(posedge clk);
    expect_p = 64'(x) * 64'(y);
    cond_seen[{x[31], y[31]}]++;
    checks++;
    if (p !== expect_p) begin
      failures++;
      $display("FAIL %0d * %0d = %0d, expected %0d", x, y, p, expect_p);
    end
  endtask

  initial begin
    apply(32'sd7, 32'sd6);
    apply(-32'sd7, 32'sd6);
    apply(32'sd7, -32'sd6);
    apply(-32'sd7, -32'sd6);
    apply(32'sh8000_0000, 32'sh8000_0000);
    apply(32'sh8000_0000, 32'sh7fff_ffff);
    apply(32'sh7fff_ffff, 32'sh7fff_ffff);
    apply(-32'sd1, -32'sd1);
    apply(32'sd0, -32'sd5);
    apply(-32'sd1, 32'sd0);
    repeat (3000) apply($urandom, $urandom);
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (cond_seen[k] == 0) begin
        failures++;
        $display("FAIL sign condition %0d never exercised", k);
      end
    end
    $display("sign conditions ++:%0d +-:%0d -+:%0d --:%0d",
             cond_seen[0], cond_seen[1], cond_seen[2], cond_seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
