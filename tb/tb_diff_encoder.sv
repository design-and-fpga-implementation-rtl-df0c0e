// tb_diff_encoder: random bits with random gaps; each output must be the
// XOR of the input and the previous output (starting from 0), one cycle
// after the input.
module tb_diff_encoder;
  logic clk = 0, rst = 1;
  logic in_bit, in_valid, out_bit, out_valid;
  int checks = 0, failures = 0;
  logic y = 0, exp_bit, exp_valid = 0;

  diff_encoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst) begin
    checks++;
    if (out_valid !== exp_valid || (exp_valid && out_bit !== exp_bit)) begin
      failures++; $display("mismatch valid %b/%b bit %b/%b", out_valid, exp_valid, out_bit, exp_bit);
    end
    exp_valid <= in_valid;
    if (in_valid) begin
      y = y ^ in_bit;
      exp_bit <= y;
    end
  end

  initial begin
    in_valid = 0; in_bit = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      in_bit   = $urandom_range(0, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
