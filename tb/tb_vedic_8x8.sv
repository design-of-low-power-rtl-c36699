// tb_vedic_8x8: exhaustive self-checking test of vedic_8x8. All 65536
// operand pairs are applied and the product compared with a reference built
// by shift-and-add over the bits of b.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_vedic_8x8;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0]  a, b;
  logic [15:0] c;

  vedic_8x8 dut (.a(a), .b(b), .c(c));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] ref_mul(input logic [7:0] x, input logic [7:0] y);
    logic [15:0] acc = '0;
    for (int i = 0; i < 8; i++) if (y[i]) acc += 16'(x) << i;
    return acc;
  endfunction

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a = 8'(i); b = 8'(j);
        #1;
        checks++;
        if (c !== ref_mul(a, b)) begin
          failures++;
          if (failures < 10) $display("FAIL %h * %h = %h, expected %h", a, b, c, ref_mul(a, b));
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
