// tb_rx_ser2par: random serial bits with gaps; each pair must come out as
// d[0] = first bit, d[1] = second bit, the cycle after the second bit.
module tb_rx_ser2par;
  logic clk = 0, rst = 1;
  logic in_bit, in_valid, out_valid;
  logic [1:0] d;
  int checks = 0, failures = 0;
  logic f; int n_in = 0;
  logic [1:0] exp_d; logic exp_valid = 0;

  rx_ser2par dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst) begin
    if (out_valid !== exp_valid || (exp_valid && d !== exp_d)) begin
      failures++; $display("mismatch %b/%b %b/%b", out_valid, exp_valid, d, exp_d);
    end
    if (exp_valid) checks++;
    exp_valid <= 0;
    if (in_valid) begin
      if (n_in % 2 == 0) f = in_bit;
      else begin exp_d <= {in_bit, f}; exp_valid <= 1; end
      n_in++;
    end
  end

  initial begin
    in_valid = 0; in_bit = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 2) != 0);
      in_bit   = $urandom_range(0, 1);
    end
    @(negedge clk); in_valid = 0;
    repeat (2) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
