// tb_soft_bit_b1: sweeps every 8-bit input value y (4 fractional bits, so
// 1.0 = 16) and checks the registered soft value against
// sb = y+2 for y <= 0, 2-y for y > 0, and the hard bit against sb >= 0.
// Also checks that the outputs hold while en is low.
module tb_soft_bit_b1;
  logic clk = 0, rst = 1, en = 0;
  logic signed [7:0] y;
  logic signed [9:0] sb;
  logic bit_out;
  int checks = 0, failures = 0;

  soft_bit_b1 dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    logic signed [9:0] held;
    y = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int v = -128; v < 128; v++) begin
      @(negedge clk); en = 1; y = 8'(v);
      @(negedge clk); en = 0;
      if (y <= 0) e = y + 32;
      else        e = 32 - y;
      checks++;
      if (int'(sb) != e || bit_out != (e >= 0)) begin
        failures++;
        $display("y=%0d: sb %0d exp %0d, bit %b", v, sb, e, bit_out);
      end
      held = sb;
      y = 8'($urandom);
      @(negedge clk);
      checks++;
      if (sb != held) begin failures++; $display("output changed with en low"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
