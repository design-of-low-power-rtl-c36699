// tb_booth_multiplier: self-checking test of booth_multiplier. The 8-bit
// instance (as used four times inside booths_16x16) is tested exhaustively;
// the 16-bit instance (the direct 16x16 unit) with corner and random operands.
// The reference is shift-and-add. Every Booth group code (000..111) occurs
// in the exhaustive sweep.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_booth_multiplier;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0]  a8, b8;
  logic [15:0] p8;
  logic [15:0] a16, b16;
  logic [31:0] p16;

  booth_multiplier #(.WIDTH(8))  dut8  (.multiplicand(a8),  .multiplier(b8),  .product(p8));
  booth_multiplier #(.WIDTH(16)) dut16 (.multiplicand(a16), .multiplier(b16), .product(p16));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_mul(input logic [15:0] x, input logic [15:0] y);
    logic [31:0] acc = '0;
    for (int i = 0; i < 16; i++) if (y[i]) acc += 32'(x) << i;
    return acc;
  endfunction

  task automatic check16(input logic [15:0] x, input logic [15:0] y);
    a16 = x; b16 = y;
    #1;
    checks++;
    if (p16 !== ref_mul(x, y)) begin
      failures++;
      $display("FAIL booth16 %h * %h = %h, expected %h", x, y, p16, ref_mul(x, y));
    end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i); b8 = 8'(j);
        #1;
        checks++;
        if (32'(p8) !== ref_mul(16'(a8), 16'(b8))) begin
          failures++;
          if (failures < 10) $display("FAIL booth8 %h * %h = %h", a8, b8, p8);
        end
      end
      @(posedge clk);
    end
    check16(16'd10, 16'd2);
    check16(16'd22, 16'd2);
    check16(16'hffff, 16'hffff);
    check16(16'h8000, 16'hffff);
    check16(16'haaaa, 16'h5555);
    check16(16'h0000, 16'hffff);
    repeat (3000) check16(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
