// tb_tx_ser2par: random serial bits with random gaps; every fourth bit a
// word must appear, the cycle after that bit, holding the first bit of the
// group in bit 3 and the last in bit 0.
module tb_tx_ser2par;
  logic clk = 0, rst = 1;
  logic in_bit, in_valid, out_valid;
  logic [3:0] out_word;
  int checks = 0, failures = 0;
  logic [3:0] grp; int n_in = 0;
  logic [3:0] exp_word; logic exp_valid = 0;

  tx_ser2par dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst) begin
    if (out_valid !== exp_valid || (exp_valid && out_word !== exp_word)) begin
      failures++; $display("mismatch valid %b/%b word %h/%h", out_valid, exp_valid, out_word, exp_word);
    end
    if (exp_valid) checks++;
    exp_valid <= 0;
    if (in_valid) begin
      grp[3 - (n_in % 4)] = in_bit;
      if (n_in % 4 == 3) begin exp_word <= grp; exp_valid <= 1; end
      n_in++;
    end
  end

  initial begin
    in_valid = 0; in_bit = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      in_bit   = $urandom_range(0, 1);
    end
    @(negedge clk); in_valid = 0;
    repeat (2) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
